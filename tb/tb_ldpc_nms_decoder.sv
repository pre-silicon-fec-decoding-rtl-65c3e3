// tb_ldpc_nms_decoder: checks the decoder against the bit-exact reference
// model over a sweep of noise levels (0..6 dB Eb/N0 plus noiseless and
// heavily corrupted words). For every codeword it compares the decoded bits,
// the iteration count and the parity flag with the model, checks the
// start-to-done latency of 2 + 4*iters clocks, and, when parity is met,
// counts codeword errors against the transmitted word. It also requires that
// both stopping causes (syndrome zero and the iteration limit) occur.
module tb_ldpc_nms_decoder;
  import ldpc_model_pkg::*;

  localparam int N = 128, M1 = 3, MAX_ITER = 10;
  localparam int ITER_W = $clog2(MAX_ITER + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [N*M1-1:0] llr;
  logic busy, done, parity_ok;
  logic [N-1:0] bits;
  logic [ITER_W-1:0] iters;

  int checks = 0, failures = 0;
  int n_early = 0, n_limit = 0, n_cw_err = 0, n_nonzero_iter = 0;

  ldpc_nms_decoder #(.N(N), .M1(M1), .MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(cw_t x, llr_t q);
    cw_t gb; int gi; bit gok; int cyc;
    golden_decode(q, MAX_ITER, gb, gi, gok);
    for (int i = 0; i < N; i++) llr[i*M1 +: M1] = M1'(q[i]);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    check(bits == gb, $sformatf("bits differ from model (iters %0d)", gi));
    check(int'(iters) == gi, $sformatf("iters %0d model %0d", iters, gi));
    check(parity_ok == gok, "parity flag");
    check(cyc == 2 + 4 * gi, $sformatf("latency %0d expected %0d", cyc, 2 + 4 * gi));
    if (gok) begin n_early++; if (bits != x) n_cw_err++; end
    else n_limit++;
    if (gi > 0) n_nonzero_iter++;
  endtask

  initial begin
    cw_t x; llr_t q;
    build_h();
    check(n_piv == 64, $sformatf("H rank %0d", n_piv));
    x = random_codeword();
    check(syndrome_ok(x), "model encoder output is a codeword");
    repeat (3) @(posedge clk);
    rst_n = 1;
    // noiseless: zero iterations
    for (int i = 0; i < N; i++) q[i] = x[i] ? -2 : 2;
    run_one(x, q);
    // sweep
    for (int db = 0; db <= 6; db++) begin
      int e0;
      e0 = n_early;
      for (int t = 0; t < 25; t++) begin
        x = random_codeword();
        channel(x, real'(db), q);
        run_one(x, q);
      end
      $display("Eb/N0 %0d dB: %0d of 25 decoded to a codeword", db, n_early - e0);
    end
    // one flipped strong bit on the all-zero word
    x = '0;
    for (int i = 0; i < N; i++) q[i] = 3;
    q[37] = -4;
    run_one(x, q);
    check(bits == '0 && parity_ok, "single error corrected");
    check(n_early > 0, "syndrome stop never seen");
    check(n_limit > 0, "iteration limit never reached");
    check(n_nonzero_iter > 0, "no iterative decode");
    $display("early=%0d limit=%0d codeword_errors_after_parity=%0d", n_early, n_limit, n_cw_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
