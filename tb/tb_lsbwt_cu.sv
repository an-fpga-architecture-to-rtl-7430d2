// Test of lsbwt_cu (8-bit characters, 7-bit ids) on its own, with the
// neighbour signals driven here: clear, insertion of the broadcast input,
// shift from the left, hold when not less or not enabled, the MAX_VALUE
// load, the EQL/EQR/SUST flags and their masking by boundary bits.
module tb_lsbwt_cu;
  localparam int DW = 8;
  localparam logic [DW:0] MAXV = 9'h100;
  logic clk = 1'b0, clear, en, set_max, capture;
  logic [DW:0] data_in, left_data, right_data, data_now;
  logic [6:0]  id_in, left_id, id_now;
  logic left_valid, less_in, right_valid, right_bound;
  logic less_out, eql, eqr, sust, bound_now;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lsbwt_cu #(.DATA_W(DW), .ID_W(7)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (data=%h id=%0d)", what, data_now, id_now); end
  endtask

  task automatic idle();
    en = 0; set_max = 0; capture = 0; clear = 0; less_in = 0;
  endtask

  task automatic tick();
    @(posedge clk); #1;
    idle();
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    data_in = '0; id_in = '0; left_data = '0; left_id = '0; right_data = '0;
    left_valid = 1; right_valid = 1; right_bound = 0;
    clear = 1; tick();
    chk(data_now == MAXV && !bound_now, "clear gives MAX_VALUE");
    // insert input into the empty CU
    data_in = 9'h41; id_in = 7'd3; en = 1; #1;
    chk(less_out, "input below MAX_VALUE is less");
    tick();
    chk(data_now == 9'h41 && id_now == 7'd3, "stores input");
    // equal input is not less: hold
    data_in = 9'h41; id_in = 7'd9; en = 1; #1;
    chk(!less_out, "equal input is not less");
    tick();
    chk(data_now == 9'h41 && id_now == 7'd3, "holds on equal input");
    // disabled: less_out low, hold
    data_in = 9'h20; id_in = 7'd4; en = 0; #1;
    chk(!less_out, "disabled CU raises no less_out");
    tick();
    chk(data_now == 9'h41, "holds when disabled");
    // left CU takes the input, this one shifts
    data_in = 9'h20; id_in = 7'd4; left_data = 9'h30; left_id = 7'd8; en = 1; less_in = 1;
    tick();
    chk(data_now == 9'h30 && id_now == 7'd8, "takes left pair on less_in");
    // flags
    left_data = 9'h30; right_data = 9'h30; right_bound = 0; #1;
    chk(eql && eqr && sust, "equal to both neighbours");
    right_bound = 1; #1;
    chk(eql && !eqr && sust, "right boundary masks EQR");
    right_valid = 0; right_bound = 0; #1;
    chk(!eqr, "no right neighbour");
    right_valid = 1;
    left_valid = 0; #1;
    chk(!eql, "no left neighbour");
    left_valid = 1;
    // capture with equal left keeps the boundary clear
    capture = 1; tick();
    chk(!bound_now, "no boundary while equal to left");
    left_data = 9'h31; #1;
    chk(!eql, "different from left");
    capture = 1; tick();
    chk(bound_now, "boundary set on capture when different");
    left_data = 9'h30; #1;
    chk(!eql && !sust || eqr, "boundary masks EQL");
    right_data = 9'h55; #1;
    chk(!sust, "no SUST with both sides apart");
    // MAX_VALUE load keeps the id
    set_max = 1; en = 1; less_in = 1; tick();
    chk(data_now == MAXV && id_now == 7'd8, "set_max loads MAX_VALUE, keeps id");
    chk(bound_now, "boundary kept over set_max");
    clear = 1; tick();
    chk(!bound_now && data_now == MAXV, "clear drops boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
