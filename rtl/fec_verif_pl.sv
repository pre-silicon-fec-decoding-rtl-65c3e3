// fec_verif_pl: programmable-logic part of the SoC-FPGA verification system
// for the (128,64) LDPC decoder. NUM_CU computation units stand side by
// side, one per processor thread, each with its own packed stream pair to
// the processing system's HP port / DMA data mover, for NUM_CU*R decoder
// replicas in all (4 x 4 = 16 by default).
//
// The units share nothing but clock and reset; the DMA engines, the
// processors and all software (codeword generation, noise, golden model,
// error counting) are outside, so their streams are this module's ports.
// Port index u belongs to unit u; the stream format is that of
// computation_unit.
//
// HLS_LANES = R/2 turns every unit into the matching set-up described in
// computation_unit, with the external decoders' lanes on the x_* ports.
//
// Four units of four decoders follow the largest configuration of the
// verification flow (four threads with four hardware decoders each); the
// 32-bit HP word and MAX_ITER = 10 are this design's choices.
module fec_verif_pl
  import ldpc_pkg::*;
#(
  parameter int NUM_CU   = 4,
  parameter int R        = 4,
  parameter int N        = 128,
  parameter int M1       = 3,
  parameter int M2       = 1,
  parameter int HP_W     = 32,
  parameter int MAX_ITER = 10,
  parameter int HLS_LANES = 0,   // per unit: 0, or R/2 to match against external decoders
  localparam int ITER_W  = iter_width(MAX_ITER),
  localparam int XL      = (HLS_LANES > 0) ? HLS_LANES : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NUM_CU-1:0][HP_W-1:0]           s_tdata,
  input  logic [NUM_CU-1:0]                     s_tvalid,
  output logic [NUM_CU-1:0]                     s_tready,
  input  logic [NUM_CU-1:0]                     s_tlast,
  output logic [NUM_CU-1:0][HP_W-1:0]           m_tdata,
  output logic [NUM_CU-1:0]                     m_tvalid,
  input  logic [NUM_CU-1:0]                     m_tready,
  output logic [NUM_CU-1:0]                     m_tlast,
  output logic [NUM_CU-1:0][R-1:0][ITER_W-1:0]  iters,
  output logic [NUM_CU-1:0][R-1:0]              parity_ok,
  // lanes of external decoders, per unit (used when HLS_LANES > 0)
  output logic [NUM_CU-1:0][XL-1:0][7:0]        x_in_tdata,
  output logic [NUM_CU-1:0][XL-1:0]             x_in_tvalid,
  input  logic [NUM_CU-1:0][XL-1:0]             x_in_tready,
  output logic [NUM_CU-1:0][XL-1:0]             x_in_tlast,
  input  logic [NUM_CU-1:0][XL-1:0][7:0]        x_out_tdata,
  input  logic [NUM_CU-1:0][XL-1:0]             x_out_tvalid,
  output logic [NUM_CU-1:0][XL-1:0]             x_out_tready,
  input  logic [NUM_CU-1:0][XL-1:0]             x_out_tlast
);

  for (genvar u = 0; u < NUM_CU; u++) begin : g_cu
    computation_unit #(.R(R), .N(N), .M1(M1), .M2(M2), .HP_W(HP_W), .MAX_ITER(MAX_ITER),
                       .HLS_LANES(HLS_LANES)) u_cu (
      .clk, .rst_n,
      .s_tdata(s_tdata[u]), .s_tvalid(s_tvalid[u]), .s_tready(s_tready[u]), .s_tlast(s_tlast[u]),
      .m_tdata(m_tdata[u]), .m_tvalid(m_tvalid[u]), .m_tready(m_tready[u]), .m_tlast(m_tlast[u]),
      .iters(iters[u]), .parity_ok(parity_ok[u]),
      .x_in_tdata(x_in_tdata[u]), .x_in_tvalid(x_in_tvalid[u]), .x_in_tready(x_in_tready[u]),
      .x_in_tlast(x_in_tlast[u]), .x_out_tdata(x_out_tdata[u]), .x_out_tvalid(x_out_tvalid[u]),
      .x_out_tready(x_out_tready[u]), .x_out_tlast(x_out_tlast[u])
    );
  end

endmodule
