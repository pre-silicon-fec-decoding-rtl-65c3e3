// tb_decoder_axis: streams noisy codewords into the decoder IP with random
// gaps on the input and random back-pressure on the output, and compares
// every output transfer with the reference model: decoded bit, m_tlast on
// transfer N-1 only, and the status outputs. It also checks that a second
// codeword is accepted while the first is still being decoded or sent.
module tb_decoder_axis;
  import ldpc_model_pkg::*;

  localparam int N = 128, M1 = 3, LANE_W = 8, MAX_ITER = 10;
  localparam int ITER_W = $clog2(MAX_ITER + 1);
  localparam int NCW = 24;

  logic clk = 0, rst_n = 0;
  logic [LANE_W-1:0] s_tdata, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic m_tvalid, m_tready = 0, m_tlast;
  logic [ITER_W-1:0] last_iters;
  logic last_parity_ok;

  int checks = 0, failures = 0, overlap = 0, stalls = 0;
  llr_t q_all [NCW];
  cw_t  gb_all [NCW];
  int   gi_all [NCW];
  bit   gok_all [NCW];

  decoder_axis #(.N(N), .M1(M1), .LANE_W(LANE_W), .MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // driver
  initial begin
    cw_t x;
    build_h();
    for (int c = 0; c < NCW; c++) begin
      x = random_codeword();
      channel(x, real'(c % 7), q_all[c]);
      golden_decode(q_all[c], MAX_ITER, gb_all[c], gi_all[c], gok_all[c]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NCW; c++)
      for (int i = 0; i < N; i++) begin
        // all stimulus changes at the falling edge; a transfer happens at
        // the rising edge that follows a falling edge with valid && ready
        @(negedge clk);
        s_tvalid = 0;
        while ($urandom_range(3, 0) == 0) @(negedge clk);
        s_tvalid = 1;
        s_tdata  = LANE_W'(M1'(q_all[c][i]));
        s_tlast  = (i == N - 1);
        while (!s_tready) @(negedge clk);
      end
    @(negedge clk);
    s_tvalid = 0;
  end

  // back-pressure
  always @(negedge clk) m_tready = ($urandom_range(3, 0) != 0);

  always @(negedge clk) begin #1; if (rst_n && m_tvalid && !m_tready) stalls++; end
  // receiving while a result is pending or being decoded
  always @(negedge clk) begin
    #1;
    if (rst_n && s_tvalid && s_tready && (dut.inflight || dut.tx_pending)) overlap++;
  end

  // monitor
  initial begin
    int c, i;
    c = 0; i = 0;
    while (c < NCW) begin
      @(negedge clk);
      #1;
      if (m_tvalid && m_tready) begin
        check(m_tdata == LANE_W'(gb_all[c][i]), $sformatf("cw %0d bit %0d", c, i));
        check(m_tlast == (i == N - 1), "tlast");
        if (i == 0) begin
          check(int'(last_iters) == gi_all[c], $sformatf("cw %0d iters %0d model %0d", c, last_iters, gi_all[c]));
          check(last_parity_ok == gok_all[c], "parity");
        end
        i++;
        if (i == N) begin i = 0; c++; end
      end
    end
    check(overlap > 0, "receive never overlapped decoding");
    check(stalls > 0, "output never stalled");
    $display("stalls=%0d overlapped_inputs=%0d", stalls, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
