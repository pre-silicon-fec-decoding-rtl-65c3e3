// tb_fec_verif_pl: end-to-end test of the programmable-logic system at its
// default size (4 computation units x 4 decoders, N = 128), standing in for
// the processor threads of the verification flow. For each unit a driver
// process generates batches of R random codewords, sends them through a
// noisy channel (Eb/N0 stepping through 0..6 dB), packs the R 3-bit LLRs of
// each element into one 32-bit word and streams the N words in with random
// gaps; a monitor process takes the N packed result words under random
// back-pressure and unpacks them.
//
// Every decoded bit is compared with the bit-exact reference decoder (the
// "mismatch" count, which must stay zero), the status outputs with the
// model's iteration count and parity flag, and the decoded word with the
// transmitted one (codeword errors, reported per Eb/N0 like a CER sweep).
// The mechanisms of the design must each occur: input back-pressure from
// busy decoders, output stalls, decoding stopped by a zero syndrome, and
// decoding stopped by the iteration limit.
module tb_fec_verif_pl;
  import ldpc_model_pkg::*;

  localparam int NUM_CU = 4, R = 4, N = 128, M1 = 3, M2 = 1, HP_W = 32, MAX_ITER = 10;
  localparam int ITER_W = $clog2(MAX_ITER + 1);
  localparam int NB = 7;   // batches per unit

  logic clk = 0, rst_n = 0;
  logic [NUM_CU-1:0][HP_W-1:0] s_tdata = '0, m_tdata;
  logic [NUM_CU-1:0] s_tvalid = '0, s_tready, s_tlast = '0;
  logic [NUM_CU-1:0] m_tvalid, m_tready = '0, m_tlast;
  logic [NUM_CU-1:0][R-1:0][ITER_W-1:0] iters;
  logic [NUM_CU-1:0][R-1:0] parity_ok;
  // external-decoder lanes, unused at the default HLS_LANES = 0
  logic [NUM_CU-1:0][0:0][7:0] x_in_tdata, x_out_tdata = '0;
  logic [NUM_CU-1:0][0:0] x_in_tvalid, x_in_tready = '0, x_in_tlast;
  logic [NUM_CU-1:0][0:0] x_out_tvalid = '0, x_out_tready, x_out_tlast = '0;

  fec_verif_pl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mismatches = 0, in_stalls = 0, out_stalls = 0, n_early = 0, n_limit = 0;
  int cw_err [7];
  int cw_cnt [7];
  bit unit_done [NUM_CU];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endfunction

  // per unit, per batch, per lane: sent word, LLRs, model results
  cw_t  tx_cw [NUM_CU][NB][R];
  llr_t tx_q  [NUM_CU][NB][R];
  cw_t  gm_b  [NUM_CU][NB][R];
  int   gm_i  [NUM_CU][NB][R];
  bit   gm_ok [NUM_CU][NB][R];

  initial begin
    build_h();
    for (int u = 0; u < NUM_CU; u++)
      for (int b = 0; b < NB; b++)
        for (int k = 0; k < R; k++) begin
          tx_cw[u][b][k] = random_codeword();
          channel(tx_cw[u][b][k], real'(b), tx_q[u][b][k]);
          golden_decode(tx_q[u][b][k], MAX_ITER, gm_b[u][b][k], gm_i[u][b][k], gm_ok[u][b][k]);
        end
    for (int d = 0; d < 7; d++) begin cw_err[d] = 0; cw_cnt[d] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  always @(negedge clk) m_tready = NUM_CU'($urandom());

  for (genvar u = 0; u < NUM_CU; u++) begin : g_unit
    // driver: the PS-side MUX packs element i of the R codewords
    initial begin
      logic [HP_W-1:0] w;
      wait (rst_n);
      for (int b = 0; b < NB; b++)
        for (int i = 0; i < N; i++) begin
          @(negedge clk);
          s_tvalid[u] = 0;
          while ($urandom_range(7, 0) == 0) @(negedge clk);
          w = '0;
          for (int k = 0; k < R; k++) w[k*M1 +: M1] = M1'(tx_q[u][b][k][i]);
          s_tvalid[u] = 1;
          s_tdata[u]  = w;
          s_tlast[u]  = (i == N - 1);
          #1;
          while (!s_tready[u]) begin in_stalls++; @(negedge clk); #1; end
        end
      @(negedge clk);
      s_tvalid[u] = 0;
    end

    // monitor: the PS-side DEMUX and the comparisons
    initial begin
      cw_t got [R];
      logic stalled;
      stalled = 0;
      wait (rst_n);
      for (int b = 0; b < NB; b++) begin
        for (int i = 0; i < N; i++) begin
          do begin
            @(negedge clk);
            #1;
            if (stalled) out_stalls++;
            stalled = m_tvalid[u] && !m_tready[u];
          end while (!(m_tvalid[u] && m_tready[u]));
          for (int k = 0; k < R; k++) got[k][i] = m_tdata[u][k*M2];
          check(m_tdata[u][HP_W-1:R*M2] == '0, "unused bits not zero");
          check(m_tlast[u] == (i == N - 1), $sformatf("unit %0d tlast at %0d", u, i));
          if (i == 0)
            for (int k = 0; k < R; k++) begin
              check(int'(iters[u][k]) == gm_i[u][b][k],
                    $sformatf("unit %0d batch %0d lane %0d iters %0d model %0d", u, b, k, iters[u][k], gm_i[u][b][k]));
              check(parity_ok[u][k] == gm_ok[u][b][k], "parity flag");
            end
        end
        for (int k = 0; k < R; k++) begin
          check(got[k] == gm_b[u][b][k], $sformatf("unit %0d batch %0d lane %0d differs from model", u, b, k));
          if (got[k] != gm_b[u][b][k]) mismatches++;
          if (got[k] != tx_cw[u][b][k]) cw_err[b]++;
          cw_cnt[b]++;
          if (gm_ok[u][b][k]) n_early++; else n_limit++;
        end
      end
      unit_done[u] = 1;
    end
  end

  initial begin
    wait (rst_n);
    wait (unit_done[0] && unit_done[1] && unit_done[2] && unit_done[3]);
    check(in_stalls > 0, "input back-pressure never seen");
    check(out_stalls > 0, "output stall never seen");
    check(n_early > 0, "zero-syndrome stop never seen");
    check(n_limit > 0, "iteration limit never reached");
    check(mismatches == 0, "mismatches against the reference model");
    for (int d = 0; d < 7; d++)
      $display("Eb/N0 %0d dB: %0d codeword errors in %0d", d, cw_err[d], cw_cnt[d]);
    $display("mismatches=%0d input_stalls=%0d output_stalls=%0d syndrome_stops=%0d limit_stops=%0d",
             mismatches, in_stalls, out_stalls, n_early, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
