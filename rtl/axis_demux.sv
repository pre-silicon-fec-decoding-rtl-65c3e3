// axis_demux: splits one packed stream into R decoder streams.
//
// Each input transfer carries element i of R codewords, codeword k in bits
// [k*M1 +: M1]. Every output lane has its own register: an input word is
// taken when each lane is empty or being emptied in the same clock, and then
// lane k presents its M1-bit field (zero-extended to LANE_W) with s_tlast.
// The lanes drain independently, so one stalled decoder stalls the input
// only when it still holds its value from the previous word.
// With DUPLICATE set the input word carries only R/2 codewords and lane k
// takes field k mod R/2, so every codeword goes to two lanes (k and
// k + R/2): the set-up that matches a decoder against a second
// implementation of it.
//
// Interface and timing: AXI-Stream on both sides, one clock from input
// transfer to output valid; s_tready is a function of the output registers
// and m_tready only.
//
// Packing several narrow codeword elements into one HP-port word follows the
// verification flow; the bit order and the register-per-lane structure are
// this design's own (the original block is produced by high-level synthesis).
module axis_demux #(
  parameter int R      = 4,
  parameter int M1     = 3,
  parameter int IN_W   = 32,
  parameter int LANE_W = 8,
  parameter bit DUPLICATE = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [IN_W-1:0]              s_tdata,
  input  logic                         s_tvalid,
  output logic                         s_tready,
  input  logic                         s_tlast,
  output logic [R-1:0][LANE_W-1:0]     m_tdata,
  output logic [R-1:0]                 m_tvalid,
  input  logic [R-1:0]                 m_tready,
  output logic [R-1:0]                 m_tlast
);

  // field of the input word that lane k takes
  function automatic int field_of(int k);
    return DUPLICATE ? (k % (R / 2)) : k;
  endfunction

  assign s_tready = &(~m_tvalid | m_tready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_tvalid <= '0;
      m_tdata  <= '0;
      m_tlast  <= '0;
    end else begin
      for (int k = 0; k < R; k++) begin
        if (s_tvalid && s_tready) begin
          m_tvalid[k] <= 1'b1;
          m_tdata[k]  <= LANE_W'(s_tdata[field_of(k)*M1 +: M1]);
          m_tlast[k]  <= s_tlast;
        end else if (m_tready[k]) begin
          m_tvalid[k] <= 1'b0;
        end
      end
    end
  end

  initial begin
    assert (R * M1 <= IN_W) else $fatal(1, "R*M1 does not fit the input word");
    assert (!DUPLICATE || (R % 2 == 0)) else $fatal(1, "DUPLICATE needs an even R");
  end

endmodule
