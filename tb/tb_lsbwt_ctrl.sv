// Test of lsbwt_ctrl (N = 8): the phase sequence and the cycles spent in
// each phase for a string needing two substitution rounds (m = 5 then 2),
// the sort counter, load and read counters, clear on the last output row,
// and the stop once the sort counter reaches N with ties left.
module tb_lsbwt_ctrl;
  import lsbwt_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst_n, in_valid, sust_any, sust_last;
  phase_e phase;
  logic in_ready, load_en, last_load, set_max, subst, last_subst, bwt_done, rd_valid, clear;
  logic [2:0] load_id, rd_idx;
  logic [3:0] sort_cnt;
  int checks = 0, failures = 0;
  int subst_left;

  always #5 clk = ~clk;

  lsbwt_ctrl #(.N(N)) dut (.*);

  // Tie model: number of tied CUs for the coming rounds.
  int rounds[$];
  always_comb sust_last = subst && (subst_left == 1);
  always @(posedge clk) begin
    if (set_max) subst_left <= rounds[0];
    else if (subst) subst_left <= subst_left - 1;
    if (last_subst) void'(rounds.pop_front());
  end
  always_comb sust_any = (rounds.size() > 0) && (phase == PH_DECIDE || phase == PH_SUBST);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_phase(input phase_e p, input int cycles, input string what);
    for (int c = 0; c < cycles; c++) begin
      chk(phase == p, $sformatf("%s: cycle %0d phase %s", what, c, phase.name()));
      if (p == PH_LOAD) chk(int'(load_id) == c, "load_id");
      if (p == PH_OUTPUT) begin
        chk(int'(rd_idx) == c, "rd_idx");
        chk(clear == (c == N - 1), "clear on last row");
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    subst_left = 0;
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // string 1: rounds of 5 and 2 tied characters
    rounds = '{5, 2};
    in_valid = 1'b1;
    expect_phase(PH_LOAD, N, "load");
    in_valid = 1'b0;
    expect_phase(PH_CAPTURE, 1, "capture0");
    chk(set_max && !bwt_done, "decide starts round 1");
    expect_phase(PH_DECIDE, 1, "decide0");
    chk(sort_cnt == 4'd1, "x = 1");
    expect_phase(PH_SUBST, 5, "subst1");
    chk(sort_cnt == 4'd2, "x = 2");
    expect_phase(PH_CAPTURE, 1, "capture1");
    expect_phase(PH_DECIDE, 1, "decide1");
    expect_phase(PH_SUBST, 2, "subst2");
    expect_phase(PH_CAPTURE, 1, "capture2");
    chk(bwt_done && !set_max, "decide ends");
    expect_phase(PH_DECIDE, 1, "decide2");
    expect_phase(PH_OUTPUT, N, "output");
    chk(phase == PH_LOAD && sort_cnt == 4'd1, "back to load");
    // string 2: ties never resolve; stops after x = N-1
    rounds.delete();
    for (int r = 0; r < 20; r++) rounds.push_back(N);
    in_valid = 1'b1;
    expect_phase(PH_LOAD, N, "load2");
    in_valid = 1'b0;
    for (int r = 1; r < N; r++) begin
      expect_phase(PH_CAPTURE, 1, "capture");
      expect_phase(PH_DECIDE, 1, "decide");
      expect_phase(PH_SUBST, N, "subst");
    end
    expect_phase(PH_CAPTURE, 1, "capture last");
    chk(bwt_done && sort_cnt == 4'(N), "stop at the sort-counter limit");
    expect_phase(PH_DECIDE, 1, "decide last");
    expect_phase(PH_OUTPUT, N, "output2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
