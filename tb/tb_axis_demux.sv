// tb_axis_demux: sends random packed words into the demultiplexer with
// random input gaps and independent random back-pressure on each output
// lane. Each lane's transfers are checked in order against the field
// [k*M1 +: M1] of the words sent, with s_tlast carried along; a stalled
// lane must hold its data. All words must arrive on every lane.
module tb_axis_demux;
  localparam int R = 4, M1 = 3, IN_W = 32, LANE_W = 8, NW = 400;

  logic clk = 0, rst_n = 0;
  logic [IN_W-1:0] s_tdata = '0;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [R-1:0][LANE_W-1:0] m_tdata;
  logic [R-1:0] m_tvalid, m_tready = '0, m_tlast;

  int checks = 0, failures = 0, in_stalls = 0;
  logic [IN_W-1:0] words [NW];
  int got [R];

  axis_demux #(.R(R), .M1(M1), .IN_W(IN_W), .LANE_W(LANE_W)) dut (.*);

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

  initial begin
    for (int w = 0; w < NW; w++) words[w] = $urandom();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      s_tvalid = 0;
      while ($urandom_range(4, 0) == 0) @(negedge clk);
      s_tvalid = 1;
      s_tdata  = words[w];
      s_tlast  = (w % 8 == 7);
      #1;
      while (!s_tready) begin in_stalls++; @(negedge clk); #1; end
    end
    @(negedge clk);
    s_tvalid = 0;
  end

  always @(negedge clk) m_tready = R'($urandom());

  logic [R-1:0] prev_stall = '0;
  logic [R-1:0][LANE_W-1:0] prev_data;
  initial begin
    for (int k = 0; k < R; k++) got[k] = 0;
    forever begin
      @(negedge clk);
      #1;
      for (int k = 0; k < R; k++) begin
        if (prev_stall[k]) check(m_tvalid[k] && m_tdata[k] == prev_data[k], "stalled lane changed");
        if (m_tvalid[k] && m_tready[k]) begin
          check(m_tdata[k] == LANE_W'(words[got[k]][k*M1 +: M1]), $sformatf("lane %0d word %0d", k, got[k]));
          check(m_tlast[k] == (got[k] % 8 == 7), "tlast");
          got[k]++;
        end
        prev_stall[k] = m_tvalid[k] && !m_tready[k];
        prev_data[k]  = m_tdata[k];
      end
      if (got[0] == NW && got[1] == NW && got[2] == NW && got[3] == NW) break;
    end
    check(in_stalls > 0, "input never stalled");
    $display("input stalls=%0d", in_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
