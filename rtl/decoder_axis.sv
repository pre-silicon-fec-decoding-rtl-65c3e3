// decoder_axis: the decoder as a stream IP. A codeword arrives as N
// AXI-Stream transfers of one LLR each and the result leaves as N transfers
// of one decoded bit each, in element order 0..N-1.
//
// How it works. A receive buffer collects the N LLRs (s_tdata[M1-1:0] of each
// transfer, counted, so s_tlast is not needed for framing). When it is full,
// the decoder is idle and the previous result has been sent, the buffer is
// handed to ldpc_nms_decoder with a start pulse and emptied, so the next
// codeword can be received while this one is decoded and sent. When the
// decoder finishes, its hard decisions are streamed out from bit 0, with
// m_tlast on transfer N-1 and the decoded bit in m_tdata[0].
//
// Interface and timing. Standard AXI-Stream valid/ready handshakes on both
// sides; m_tvalid never depends combinationally on m_tready and s_tready
// never on s_tvalid. last_iters and last_parity_ok give the iteration count
// and parity status of the most recent codeword (updated at done).
//
// The stream protocol with N transfers per codeword in and out follows the
// verification flow this IP was built for; the lane width, the counting
// framing and the overlap of receiving with decoding are this design's own.
module decoder_axis
  import ldpc_pkg::*;
#(
  parameter int N        = 128,
  parameter int M1       = 3,
  parameter int M2       = 1,
  parameter int LANE_W   = 8,
  parameter int MAX_ITER = 10,
  localparam int ITER_W  = iter_width(MAX_ITER)
) (
  input  logic              clk,
  input  logic              rst_n,
  // LLR stream in
  input  logic [LANE_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  input  logic              s_tlast,
  // decoded stream out
  output logic [LANE_W-1:0] m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic              m_tlast,
  // status of the last decoded codeword
  output logic [ITER_W-1:0] last_iters,
  output logic              last_parity_ok
);

  localparam int CNT_W = $clog2(N);

  logic [N*M1-1:0]  rx_buf;
  logic [CNT_W-1:0] rx_cnt, tx_cnt;
  logic             rx_full, start, inflight, tx_pending;
  logic             dec_busy, dec_done;
  logic [N-1:0]     dec_bits;

  ldpc_nms_decoder #(.N(N), .M1(M1), .MAX_ITER(MAX_ITER)) u_dec (
    .clk, .rst_n, .start, .llr(rx_buf),
    .busy(dec_busy), .done(dec_done), .bits(dec_bits),
    .iters(last_iters), .parity_ok(last_parity_ok)
  );

  assign s_tready = !rx_full;
  assign m_tvalid = tx_pending;
  assign m_tlast  = (tx_cnt == CNT_W'(N - 1));
  assign m_tdata  = LANE_W'(dec_bits[tx_cnt]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_cnt     <= '0;
      rx_full    <= 1'b0;
      rx_buf     <= '0;
      start      <= 1'b0;
      inflight   <= 1'b0;
      tx_pending <= 1'b0;
      tx_cnt     <= '0;
    end else begin
      start <= 1'b0;
      // receive
      if (s_tvalid && s_tready) begin
        rx_buf[rx_cnt*M1 +: M1] <= s_tdata[M1-1:0];
        rx_cnt <= (rx_cnt == CNT_W'(N - 1)) ? '0 : rx_cnt + 1'b1;
        if (rx_cnt == CNT_W'(N - 1)) rx_full <= 1'b1;
      end
      // launch
      if (rx_full && !inflight && !tx_pending && !dec_busy) begin
        start    <= 1'b1;
        inflight <= 1'b1;
        rx_full  <= 1'b0;
      end
      // result ready
      if (dec_done) begin
        inflight   <= 1'b0;
        tx_pending <= 1'b1;
        tx_cnt     <= '0;
      end
      // send
      if (m_tvalid && m_tready) begin
        tx_cnt <= tx_cnt + 1'b1;
        if (m_tlast) tx_pending <= 1'b0;
      end
    end
  end

  // s_tlast only marks the last element; it must agree with the count.
  property p_tlast_at_end;
    @(posedge clk) disable iff (!rst_n)
      (s_tvalid && s_tready && s_tlast) |-> (rx_cnt == CNT_W'(N - 1));
  endproperty
  a_tlast_at_end: assert property (p_tlast_at_end)
    else $error("decoder_axis: s_tlast before transfer N-1");

  // Output stream rule: a pending transfer stays until it is taken.
  a_m_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata) && $stable(m_tlast)))
    else $error("decoder_axis: output changed while stalled");

  initial begin
    assert (M2 == 1) else $fatal(1, "the decoder gives hard decisions only (M2 = 1)");
    assert (M1 <= LANE_W) else $fatal(1, "M1 wider than the lane");
  end

endmodule
