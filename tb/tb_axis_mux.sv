// tb_axis_mux: feeds R lanes with independent random gaps and applies random
// back-pressure on the packed output. Each output word must hold, in bit k
// (lane k's M2-bit field), the next value sent on lane k, zero above R*M2,
// with m_tlast from the lanes; output must hold while stalled.
module tb_axis_mux;
  localparam int R = 4, M2 = 1, OUT_W = 32, LANE_W = 8, NW = 400;

  logic clk = 0, rst_n = 0;
  logic [R-1:0][LANE_W-1:0] s_tdata = '0;
  logic [R-1:0] s_tvalid = '0, s_tready, s_tlast = '0;
  logic [OUT_W-1:0] m_tdata;
  logic m_tvalid, m_tready = 0, m_tlast;

  int checks = 0, failures = 0, out_stalls = 0;
  logic [R-1:0] vals [NW];

  axis_mux #(.R(R), .M2(M2), .OUT_W(OUT_W), .LANE_W(LANE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial for (int w = 0; w < NW; w++) vals[w] = R'($urandom());

  // one driver per lane; upper lane bits random to check they are dropped
  for (genvar k = 0; k < R; k++) begin : g_drv
    initial begin
      wait (rst_n);
      for (int w = 0; w < NW; w++) begin
        @(negedge clk);
        s_tvalid[k] = 0;
        while ($urandom_range(3, 0) == 0) @(negedge clk);
        s_tvalid[k] = 1;
        s_tdata[k]  = {LANE_W'($urandom()) & ~LANE_W'(1), vals[w][k]};
        s_tlast[k]  = (w % 16 == 15);
        #1;
        while (!s_tready[k]) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      s_tvalid[k] = 0;
    end
  end

  always @(negedge clk) m_tready = ($urandom_range(2, 0) != 0);

  initial begin
    int n;
    logic stalled;
    logic [OUT_W-1:0] held;
    n = 0; stalled = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n < NW) begin
      @(negedge clk);
      #1;
      if (stalled) check(m_tvalid && m_tdata == held, "stalled output changed");
      if (m_tvalid && m_tready) begin
        check(m_tdata == OUT_W'(vals[n]), $sformatf("word %0d: %h expected %h", n, m_tdata, vals[n]));
        check(m_tlast == (n % 16 == 15), "tlast");
        n++;
      end
      stalled = m_tvalid && !m_tready;
      if (stalled) out_stalls++;
      held = m_tdata;
    end
    check(out_stalls > 0, "output never stalled");
    $display("output stalls=%0d", out_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
