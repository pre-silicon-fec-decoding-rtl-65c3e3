// computation_unit: the programmable-logic side of one computation unit,
// served by one processor thread. One packed input stream from the HP port
// is split by axis_demux into R streams, R decoder_axis instances decode R
// codewords in parallel, and axis_mux packs their results into one output
// stream back to the HP port.
//
// Interface: s_* is the packed LLR stream (HP_W-bit words, codeword k's
// element in bits [k*M1 +: M1], N transfers per batch of R codewords); m_*
// is the packed result stream (codeword k's decoded bit in bit k*M2, N
// transfers, m_tlast on the last). iters and parity_ok report each decoder's
// last codeword. The first result word leaves a few clocks plus 4 clocks
// per iteration of the slowest of the R decoders after the last input word;
// a new batch can be received while the previous one is decoded.
//
// With HLS_LANES = R/2 the unit is set up for matching against a second
// decoder implementation: each input word carries R/2 codewords, the DEMUX
// sends codeword k both to decoder k and to lane k + R/2, and lanes
// R/2..R-1 are not decoded here but brought out on the x_* ports to an
// external decoder IP (for instance one produced by high-level synthesis
// from the software reference), whose results re-enter the MUX; output word
// i then holds bit i of the R/2 codewords twice, in bits k and k + R/2.
// With HLS_LANES = 0 (default) the x_* ports are unused: x_in_* are driven
// to zero and x_out_tready is low.
//
// The DEMUX / R decoders / MUX chain and the widths N x (M1*R) and
// N x (M2*R) follow the verification flow; HP_W = 32 is this design's choice.
module computation_unit
  import ldpc_pkg::*;
#(
  parameter int R        = 4,
  parameter int N        = 128,
  parameter int M1       = 3,
  parameter int M2       = 1,
  parameter int HP_W     = 32,
  parameter int MAX_ITER = 10,
  parameter int HLS_LANES = 0,   // 0, or R/2 for the matching set-up
  localparam int LANE_W  = 8,
  localparam int ITER_W  = iter_width(MAX_ITER),
  localparam int XL      = (HLS_LANES > 0) ? HLS_LANES : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [HP_W-1:0]        s_tdata,
  input  logic                   s_tvalid,
  output logic                   s_tready,
  input  logic                   s_tlast,
  output logic [HP_W-1:0]        m_tdata,
  output logic                   m_tvalid,
  input  logic                   m_tready,
  output logic                   m_tlast,
  output logic [R-1:0][ITER_W-1:0] iters,
  output logic [R-1:0]           parity_ok,
  // lanes served by an external decoder (HLS_LANES > 0)
  output logic [XL-1:0][LANE_W-1:0] x_in_tdata,
  output logic [XL-1:0]          x_in_tvalid,
  input  logic [XL-1:0]          x_in_tready,
  output logic [XL-1:0]          x_in_tlast,
  input  logic [XL-1:0][LANE_W-1:0] x_out_tdata,
  input  logic [XL-1:0]          x_out_tvalid,
  output logic [XL-1:0]          x_out_tready,
  input  logic [XL-1:0]          x_out_tlast
);

  localparam int NHW = R - HLS_LANES;  // decoders inside the unit

  logic [R-1:0][LANE_W-1:0] in_tdata, out_tdata;
  logic [R-1:0]             in_tvalid, in_tready, in_tlast;
  logic [R-1:0]             out_tvalid, out_tready, out_tlast;

  axis_demux #(.R(R), .M1(M1), .IN_W(HP_W), .LANE_W(LANE_W), .DUPLICATE(HLS_LANES > 0)) u_demux (
    .clk, .rst_n,
    .s_tdata, .s_tvalid, .s_tready, .s_tlast,
    .m_tdata(in_tdata), .m_tvalid(in_tvalid), .m_tready(in_tready), .m_tlast(in_tlast)
  );

  for (genvar k = 0; k < NHW; k++) begin : g_dec
    decoder_axis #(.N(N), .M1(M1), .M2(M2), .LANE_W(LANE_W), .MAX_ITER(MAX_ITER)) u_dec (
      .clk, .rst_n,
      .s_tdata(in_tdata[k]), .s_tvalid(in_tvalid[k]), .s_tready(in_tready[k]), .s_tlast(in_tlast[k]),
      .m_tdata(out_tdata[k]), .m_tvalid(out_tvalid[k]), .m_tready(out_tready[k]), .m_tlast(out_tlast[k]),
      .last_iters(iters[k]), .last_parity_ok(parity_ok[k])
    );
  end

  if (HLS_LANES > 0) begin : g_ext
    for (genvar x = 0; x < HLS_LANES; x++) begin : g_lane
      assign x_in_tdata[x]       = in_tdata[NHW + x];
      assign x_in_tvalid[x]      = in_tvalid[NHW + x];
      assign in_tready[NHW + x]  = x_in_tready[x];
      assign x_in_tlast[x]       = in_tlast[NHW + x];
      assign out_tdata[NHW + x]  = x_out_tdata[x];
      assign out_tvalid[NHW + x] = x_out_tvalid[x];
      assign x_out_tready[x]     = out_tready[NHW + x];
      assign out_tlast[NHW + x]  = x_out_tlast[x];
      assign iters[NHW + x]      = '0;
      assign parity_ok[NHW + x]  = 1'b0;
    end
  end else begin : g_no_ext
    assign x_in_tdata   = '0;
    assign x_in_tvalid  = '0;
    assign x_in_tlast   = '0;
    assign x_out_tready = '0;
  end

  initial assert (HLS_LANES == 0 || 2 * HLS_LANES == R)
    else $fatal(1, "HLS_LANES must be 0 or R/2");

  axis_mux #(.R(R), .M2(M2), .OUT_W(HP_W), .LANE_W(LANE_W)) u_mux (
    .clk, .rst_n,
    .s_tdata(out_tdata), .s_tvalid(out_tvalid), .s_tready(out_tready), .s_tlast(out_tlast),
    .m_tdata, .m_tvalid, .m_tready, .m_tlast
  );

endmodule
