// Test of lsbwt_flag_reg (N = 16): capture of EQL and SUST words, clearing
// one SUST bit per cycle, sust_last on the last set bit, sust_any, and that
// the stored words ignore their inputs outside capture.
module tb_lsbwt_flag_reg;
  localparam int N = 16;
  logic clk = 1'b0, clear, capture, clr_en;
  logic [N-1:0] eql_in, sust_in, clr_mask, eql_q, sust_q;
  logic sust_any, sust_last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lsbwt_flag_reg #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] s;
    clear = 1'b1; capture = 0; clr_en = 0; eql_in = '0; sust_in = '0; clr_mask = '0;
    @(posedge clk); #1 clear = 1'b0;
    chk(!sust_any && sust_q == '0, "empty after clear");
    for (int t = 0; t < 20; t++) begin
      s = N'($urandom) | N'(1);
      @(negedge clk);
      capture = 1'b1; sust_in = s; eql_in = s & N'($urandom);
      @(posedge clk); #1;
      capture = 1'b0;
      chk(sust_q == s, "SUST captured");
      chk(eql_q == (s & eql_in), "EQL captured");
      sust_in = ~s; eql_in = '1;
      for (int i = 0; i < N; i++) if (s[i]) begin
        logic [N-1:0] rest;
        rest = s & ~(N'(1) << i);
        @(negedge clk);
        clr_en = 1'b1; clr_mask = N'(1) << i;
        #1;
        chk(sust_any, "sust_any while bits remain");
        chk(sust_last == (rest == '0), $sformatf("sust_last at bit %0d", i));
        @(posedge clk); #1;
        clr_en = 1'b0;
        chk(sust_q == rest, $sformatf("bit %0d cleared", i));
        s = rest;
      end
      chk(!sust_any, "sust_any low when empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
