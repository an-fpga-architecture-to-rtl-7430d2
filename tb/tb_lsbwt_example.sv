// Worked example: the seven-character string "TASGASC" through lsbwt_top
// with N = 7. The sorted rotations are ASCTASG, ASGASCT, CTASGAS, GASCTAS,
// SCTASGA, SGASCTA, TASGASC, so the index order is 4 1 6 3 5 2 0, the BWT
// is "GTSSAAC" and the original string sits in row 6. The ties take two
// substitution rounds (4 then 2 characters), so the transform takes
// 2*7 + 2 + (4+2) + (2+2) = 26 cycles from the first character to the last
// output row.
module tb_lsbwt_example;
  localparam int N = 7;
  logic clk = 1'b0, rst_n, in_valid, in_ready, out_valid, out_primary;
  logic first_done, round_done, busy;
  logic [7:0] in_data, out_char;
  logic [2:0] out_id, out_prefix, primary_idx, phase;
  int checks = 0, failures = 0;
  byte unsigned s   [N] = '{"T", "A", "S", "G", "A", "S", "C"};
  byte unsigned bwt [N] = '{"G", "T", "S", "S", "A", "A", "C"};
  int           ord [N] = '{4, 1, 6, 3, 5, 2, 0};
  longint cyc = 0, t0 = 0, t1 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  lsbwt_top #(.N(N), .DATA_W(8)) dut (.*);

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
    int row;
    rst_n = 0; in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    t0 = cyc;
    for (int i = 0; i < N; i++) begin
      in_valid = 1; in_data = s[i];
      @(posedge clk); #1;
    end
    in_valid = 0;
    row = 0;
    while (row < N) begin
      if (out_valid) begin
        chk(int'(out_id) == ord[row], $sformatf("row %0d index %0d", row, out_id));
        chk(out_char == bwt[row], $sformatf("row %0d BWT char %s", row, out_char));
        row++;
        t1 = cyc;
      end
      @(posedge clk); #1;
    end
    chk(primary_idx == 3'd6, $sformatf("primary row %0d", primary_idx));
    chk(t1 - t0 + 1 == 26, $sformatf("%0d cycles, expected 26", t1 - t0 + 1));
    $display("example: %0d cycles", t1 - t0 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
