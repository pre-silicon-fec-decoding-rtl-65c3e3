// hls_decoder_model: behavioural stand-in for a decoder IP generated by
// high-level synthesis from the software reference decoder. Not
// synthesizable. It has the same stream interface as decoder_axis: N
// transfers of one LLR in (bits [M1-1:0]), then, after a fixed extra delay
// of LATENCY clocks, N transfers of one decoded bit out (bit 0), tlast on the
// last. The decoding itself is the reference model's golden_decode.
module hls_decoder_model
  import ldpc_model_pkg::*;
#(
  parameter int N        = 128,
  parameter int M1       = 3,
  parameter int LANE_W   = 8,
  parameter int MAX_ITER = 10,
  parameter int LATENCY  = 200
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LANE_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic              s_tlast,
  output logic [LANE_W-1:0] m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic              m_tlast
);
  initial begin
    llr_t q;
    cw_t  b;
    int   it;
    bit   ok;
    s_tready = 0;
    m_tvalid = 0;
    m_tdata  = '0;
    m_tlast  = 0;
    wait (rst_n);
    forever begin
      // receive (signals change at the falling edge, transfers at the rising)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        s_tready = 1;
        #1;
        while (!s_tvalid) begin @(negedge clk); #1; end
        q[i] = int'($signed(s_tdata[M1-1:0]));
        if (s_tlast != (i == N - 1)) $error("hls_decoder_model: tlast at %0d", i);
      end
      @(negedge clk);
      s_tready = 0;
      golden_decode(q, MAX_ITER, b, it, ok);
      repeat (LATENCY) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        m_tvalid = 1;
        m_tdata  = LANE_W'(b[i]);
        m_tlast  = (i == N - 1);
        #1;
        while (!m_tready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      m_tvalid = 0;
      m_tlast  = 0;
    end
  end
endmodule
