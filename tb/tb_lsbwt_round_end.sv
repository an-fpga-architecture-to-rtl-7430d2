// Test of lsbwt_round_end: pulse one cycle after last_load / last_subst,
// first_done set after the first sort, round_done held after bwt_done,
// and clear dropping everything.
module tb_lsbwt_round_end;
  logic clk = 1'b0, clear, last_load, last_subst, bwt_done;
  logic first_done, pulse, round_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lsbwt_round_end dut (.*);

  task automatic step_expect(input bit ll, input bit ls, input bit bd,
                             input bit e_first, input bit e_pulse, input bit e_round);
    @(negedge clk);
    last_load = ll; last_subst = ls; bwt_done = bd;
    @(posedge clk); #1;
    last_load = 1'b0; last_subst = 1'b0; bwt_done = 1'b0;
    checks++;
    if (first_done != e_first || pulse != e_pulse || round_done != e_round) begin
      failures++;
      $display("FAIL: got first=%0b pulse=%0b round=%0b, expected %0b %0b %0b",
               first_done, pulse, round_done, e_first, e_pulse, e_round);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; last_load = 1'b0; last_subst = 1'b0; bwt_done = 1'b0;
    @(posedge clk); #1 clear = 1'b0;
    step_expect(0, 0, 0, 0, 0, 0);
    step_expect(1, 0, 0, 1, 1, 1);   // first sort ends
    step_expect(0, 0, 0, 1, 0, 0);
    step_expect(0, 1, 0, 1, 1, 1);   // an iteration ends
    step_expect(0, 0, 0, 1, 0, 0);
    step_expect(0, 0, 0, 1, 0, 0);
    step_expect(0, 0, 1, 1, 0, 1);   // BWT done: round_done held
    step_expect(0, 0, 0, 1, 0, 1);
    step_expect(0, 0, 0, 1, 0, 1);
    @(negedge clk) clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    checks++;
    if (first_done || pulse || round_done) begin failures++; $display("FAIL: clear"); end
    step_expect(0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
