// Full-size test of lsbwt_top with its default parameters (128 CUs, 8-bit
// characters). Runs the worst case of the evaluation (127 equal characters
// out of 128), two 128-character strings built from a small word list, two
// 128-character English sentences whose rotations share at most 7 leading
// characters, and a random string over a four-letter alphabet, each checked against the reference model, including
// the cycle count 2n + 2 + sum_i (m_i + 2).
module tb_lsbwt_full;
  localparam int N = lsbwt_pkg::DEF_N;
  localparam int DATA_W = lsbwt_pkg::DEF_DATA_W;

  lsbwt_top dut (.*);

  `include "lsbwt_tb_body.svh"

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned s[];
    string english;
    do_reset();
    make_fill(s, 8'h61, 77, 8'h62);
    run_string(s, 1'b0, "equal127of128");
    make_text(s, 11);
    run_string(s, 1'b0, "text_a");
    make_text(s, 12345);
    run_string(s, 1'b0, "text_b");
    english = "a linear sorter places every new value among the stored values in one clock cycle, so the string is sorted by the time it ends. ";
    foreach (s[i]) s[i] = english[i];
    run_string(s, 1'b0, "english_a");
    english = "the linear sorter places every new value among the stored values in one cycle, so the string is in order as soon as it ends.    ";
    foreach (s[i]) s[i] = english[i];
    run_string(s, 1'b0, "english_b");
    foreach (s[i]) s[i] = byte'(($urandom % 4) * 2 + 65);
    run_string(s, 1'b0, "dna_like");
    report_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
