// axis_mux: joins R decoder output streams into one packed stream.
//
// A packed word is formed when all R lanes offer a transfer and the output
// register is empty or being emptied: lane k's M2-bit field (s_tdata[k]
// bits [M2-1:0]) goes to bits [k*M2 +: M2], the upper bits are zero, and all
// lanes are acknowledged together. m_tlast is taken from lane 0; an
// assertion checks that the lanes agree, since they carry the same element
// index of R codewords.
//
// Interface and timing: AXI-Stream on both sides, one clock from the joined
// input transfer to output valid; s_tready depends on s_tvalid of all lanes
// (a join) but never on its own lane alone.
//
// Packing results into one HP-port word follows the verification flow; bit
// order and the single output register are this design's own.
module axis_mux #(
  parameter int R      = 4,
  parameter int M2     = 1,
  parameter int OUT_W  = 32,
  parameter int LANE_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [R-1:0][LANE_W-1:0] s_tdata,
  input  logic [R-1:0]             s_tvalid,
  output logic [R-1:0]             s_tready,
  input  logic [R-1:0]             s_tlast,
  output logic [OUT_W-1:0]         m_tdata,
  output logic                     m_tvalid,
  input  logic                     m_tready,
  output logic                     m_tlast
);

  logic             load;
  logic [OUT_W-1:0] packed_word;

  assign load     = (&s_tvalid) && (!m_tvalid || m_tready);
  assign s_tready = {R{load}};

  always_comb begin
    packed_word = '0;
    for (int k = 0; k < R; k++) packed_word[k*M2 +: M2] = s_tdata[k][M2-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tlast  <= 1'b0;
    end else if (load) begin
      m_tvalid <= 1'b1;
      m_tdata  <= packed_word;
      m_tlast  <= s_tlast[0];
    end else if (m_tready) begin
      m_tvalid <= 1'b0;
    end
  end

  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      load |-> (s_tlast == '0 || s_tlast == '1))
    else $error("axis_mux: lanes disagree on tlast");

  initial assert (R * M2 <= OUT_W) else $fatal(1, "R*M2 does not fit the output word");

endmodule
