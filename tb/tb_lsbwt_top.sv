// End-to-end test of lsbwt_top at N = 16 (the string length of the random
// text experiment). Runs text strings, a string with all characters but one
// equal, a string of distinct characters (no substitution), a periodic
// string (stopped by the sort-counter limit), a string with input gaps and
// back-to-back strings, all checked against the reference model, and
// requires each mechanism of the design to occur.
module tb_lsbwt_top;
  localparam int N = 16;
  localparam int DATA_W = 8;

  lsbwt_top #(.N(N), .DATA_W(DATA_W)) dut (.*);

  `include "lsbwt_tb_body.svh"

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned s[];
    do_reset();
    for (int t = 0; t < 10; t++) begin
      make_text(s, 7 + t * 31);
      run_string(s, 1'b0, $sformatf("text%0d", t));
    end
    make_fill(s, 8'h61, 5, 8'h62);
    run_string(s, 1'b0, "fifteen_equal");
    s = new[N];
    foreach (s[i]) s[i] = byte'(240 - i * 7);
    run_string(s, 1'b0, "distinct");
    foreach (s[i]) s[i] = (i % 4 < 2) ? 8'h41 : 8'h42;
    run_string(s, 1'b0, "periodic");
    foreach (s[i]) s[i] = byte'($urandom % 3 + 120);
    run_string(s, 1'b1, "gaps");
    foreach (s[i]) s[i] = (i == 3) ? 8'hFF : 8'h00;
    run_string(s, 1'b0, "extremes");
    check(n_done_limit > 0, "mechanism: stop at the sort-counter limit");
    report_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
