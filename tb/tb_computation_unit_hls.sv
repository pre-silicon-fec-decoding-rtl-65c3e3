// tb_computation_unit_hls: the matching set-up. One computation unit with
// R = 4 and HLS_LANES = 2: each packed input word carries 2 codewords, the
// DEMUX sends codeword k to decoder k and to external lane k + 2, where a
// behavioural model of an HLS-generated decoder (slower, same stream
// interface) answers. For every batch the two results of each codeword
// (output bits k and k + 2) must agree ("mismatch" count, which must stay
// zero) and equal the reference model. The slow external lanes must hold up
// the join in the MUX at least once, and the status outputs of the internal
// decoders are checked against the model.
module tb_computation_unit_hls;
  import ldpc_model_pkg::*;

  localparam int R = 4, H = 2, N = 128, M1 = 3, M2 = 1, HP_W = 32, MAX_ITER = 10;
  localparam int ITER_W = $clog2(MAX_ITER + 1);
  localparam int NB = 14;

  logic clk = 0, rst_n = 0;
  logic [HP_W-1:0] s_tdata = '0, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic m_tvalid, m_tready = 0, m_tlast;
  logic [R-1:0][ITER_W-1:0] iters;
  logic [R-1:0] parity_ok;
  logic [H-1:0][7:0] x_in_tdata, x_out_tdata;
  logic [H-1:0] x_in_tvalid, x_in_tready, x_in_tlast, x_out_tvalid, x_out_tready, x_out_tlast;

  computation_unit #(.R(R), .N(N), .M1(M1), .M2(M2), .HP_W(HP_W), .MAX_ITER(MAX_ITER),
                     .HLS_LANES(H)) dut (.*);

  for (genvar x = 0; x < H; x++) begin : g_hls
    hls_decoder_model #(.N(N), .M1(M1), .MAX_ITER(MAX_ITER), .LATENCY(150 + 50 * x)) u_hls (
      .clk, .rst_n,
      .s_tdata(x_in_tdata[x]), .s_tvalid(x_in_tvalid[x]), .s_tready(x_in_tready[x]), .s_tlast(x_in_tlast[x]),
      .m_tdata(x_out_tdata[x]), .m_tvalid(x_out_tvalid[x]), .m_tready(x_out_tready[x]), .m_tlast(x_out_tlast[x])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, mismatches = 0, join_waits = 0;
  cw_t  tx_cw [NB][H];
  llr_t tx_q  [NB][H];
  cw_t  gm_b  [NB][H];
  int   gm_i  [NB][H];
  bit   gm_ok [NB][H];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endfunction

  // internal lanes ready while an external lane is not: the join waits
  always @(negedge clk) begin
    #1;
    if (rst_n && dut.out_tvalid[0] && dut.out_tvalid[1] && !(&dut.out_tvalid)) join_waits++;
  end

  always @(negedge clk) m_tready = ($urandom_range(3, 0) != 0);

  initial begin
    logic [HP_W-1:0] w;
    build_h();
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < H; k++) begin
        tx_cw[b][k] = random_codeword();
        channel(tx_cw[b][k], real'(b % 7), tx_q[b][k]);
        golden_decode(tx_q[b][k], MAX_ITER, gm_b[b][k], gm_i[b][k], gm_ok[b][k]);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        s_tvalid = 0;
        while ($urandom_range(7, 0) == 0) @(negedge clk);
        w = '0;
        for (int k = 0; k < H; k++) w[k*M1 +: M1] = M1'(tx_q[b][k][i]);
        w[HP_W-1:H*M1] = '1;   // fields beyond R/2 codewords must be ignored
        s_tvalid = 1;
        s_tdata  = w;
        s_tlast  = (i == N - 1);
        #1;
        while (!s_tready) begin @(negedge clk); #1; end
      end
    @(negedge clk);
    s_tvalid = 0;
  end

  initial begin
    cw_t got [R];
    wait (rst_n);
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < N; i++) begin
        do begin @(negedge clk); #1; end while (!(m_tvalid && m_tready));
        for (int k = 0; k < R; k++) got[k][i] = m_tdata[k*M2];
        check(m_tlast == (i == N - 1), "tlast");
        if (i == 0)
          for (int k = 0; k < H; k++)
            check(int'(iters[k]) == gm_i[b][k], $sformatf("batch %0d lane %0d iters", b, k));
      end
      for (int k = 0; k < H; k++) begin
        check(got[k] == got[k + H], $sformatf("batch %0d codeword %0d: HW and HLS lanes differ", b, k));
        if (got[k] != got[k + H]) mismatches++;
        check(got[k] == gm_b[b][k], $sformatf("batch %0d codeword %0d differs from model", b, k));
      end
    end
    check(join_waits > 0, "the MUX never waited for the external lanes");
    check(mismatches == 0, "HW/HLS mismatches");
    $display("mismatches=%0d join_waits=%0d", mismatches, join_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
