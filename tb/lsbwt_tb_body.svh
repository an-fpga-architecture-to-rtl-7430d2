// Shared body of the end-to-end LSBWT testbenches. The including module
// declares localparam N and DATA_W and instantiates lsbwt_top as dut; this
// file provides the clock, stimulus tasks, the reference checks and the
// counters of the mechanisms exercised.
//
// Every string is checked against the reference model (lsbwt_ref_pkg):
//   - the indexes read out are a permutation of 0..N-1,
//   - consecutive rows are in non-decreasing rotation order (strictly
//     increasing unless two rotations are identical),
//   - out_prefix = (id-1) mod N and out_char = s[out_prefix],
//   - out_primary is set exactly on the row of index 0, primary_idx = row,
//   - with continuous input, the cycle count from the first accepted
//     character to the last output row equals 2N + 2 + sum_i (m_i + 2).

  import lsbwt_pkg::*;
  import lsbwt_ref_pkg::*;

  localparam int ID_W = (N > 1) ? $clog2(N) : 1;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid;
  logic              in_ready;
  logic [DATA_W-1:0] in_data;
  logic              out_valid;
  logic [ID_W-1:0]   out_id, out_prefix, primary_idx;
  logic [DATA_W-1:0] out_char;
  logic              out_primary, first_done, round_done, busy;
  logic [2:0]        phase;

  byte unsigned cur_s [N];   // string under test
  int checks = 0;
  int failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_load_shift = 0;    // insertion during load that shifted stored items
  int n_group_start = 0;   // substitution cycle starting a group (EQL = 0)
  int n_group_cont = 0;    // substitution cycle inside a group (EQL = 1)
  int n_subst_shift = 0;   // substitution insertion that shifted in-group items
  int n_set_max = 0;       // decide cycles loading MAX_VALUE into tied CUs
  int n_multi_group = 0;   // iterations with more than one tied group
  int n_done_clean = 0;    // transform finished with no ties left
  int n_done_limit = 0;    // transform stopped by the sort-counter limit
  int n_round_hold = 0;    // cycles with round_done held after completion
  int n_first_done = 0;    // strings whose first sort was flagged done
  int starts_this_iter = 0;
  bit first_done_q = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (dut.load_en && $countones(dut.less) > 1) n_load_shift++;
    if (dut.subst && !dut.eql_q[dut.pe_idx]) begin n_group_start++; starts_this_iter++; end
    if (dut.subst && dut.eql_q[dut.pe_idx]) n_group_cont++;
    if (dut.subst && $countones(dut.less) > 1) n_subst_shift++;
    if (dut.set_max) n_set_max++;
    if (dut.last_subst) begin
      if (starts_this_iter > 1) n_multi_group++;
      starts_this_iter = 0;
    end
    if (dut.bwt_done && !dut.sust_any) n_done_clean++;
    if (dut.bwt_done && dut.sust_any) n_done_limit++;
    if (out_valid && round_done) n_round_hold++;
    if (first_done && !first_done_q) n_first_done++;
    first_done_q = first_done;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_reset();
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // Feed s (length N), collect and check the output. gaps inserts idle
  // cycles in the input stream; the cycle count is then not checked.
  task automatic run_string(input byte unsigned s[], input bit gaps, input string name);
    int exp_iters, exp_steps;
    longint t0, t1;
    int ids[$];
    int seen[] = new[N];
    int row;
    bit prim_ok;
    int prim_row;
    int tmp;
    byte unsigned exp_c;
    tmp = expected_steps(s, exp_iters);
    exp_steps = tmp;
    foreach (cur_s[i]) cur_s[i] = s[i];
    // wait until ready for a new string
    while (!in_ready) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid = 1'b0;
        @(posedge clk); #1;
      end
      in_valid = 1'b1;
      in_data  = s[i];
      if (i == 0) t0 = cyc;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    // collect N output rows
    row = 0;
    prim_ok = 1'b1;
    prim_row = -1;
    while (row < N) begin
      if (out_valid) begin
        ids.push_back(int'(out_id));
        check(int'(out_prefix) == ((int'(out_id) + N - 1) % N), $sformatf("%s: prefix row %0d", name, row));
        exp_c = cur_s[out_prefix];
        check(out_char == exp_c, $sformatf("%s: BWT char row %0d", name, row));
        if (out_primary != (out_id == 0)) prim_ok = 1'b0;
        if (out_id == 0) prim_row = row;
        row++;
        t1 = cyc;
      end
      @(posedge clk); #1;
    end
    check(prim_ok, $sformatf("%s: primary flag", name));
    check(int'(primary_idx) == prim_row, $sformatf("%s: primary_idx %0d vs %0d", name, primary_idx, prim_row));
    foreach (seen[i]) seen[i] = 0;
    foreach (ids[i]) seen[ids[i]]++;
    begin
      bit perm = 1'b1;
      foreach (seen[i]) if (seen[i] != 1) perm = 1'b0;
      check(perm, $sformatf("%s: indexes form a permutation", name));
    end
    for (int r = 0; r + 1 < N; r++) begin
      int c;
      c = rot_cmp(s, ids[r], ids[r + 1]);
      check(c <= 0, $sformatf("%s: order at row %0d", name, r));
    end
    if (!gaps)
      check(int'(t1 - t0 + 1) == exp_steps,
            $sformatf("%s: %0d cycles, expected %0d", name, t1 - t0 + 1, exp_steps));
    $display("%s: k=%0d steps=%0d (expected %0d)%s", name, exp_iters, t1 - t0 + 1, exp_steps,
             gaps ? " with input gaps" : "");
  endtask

  // Pseudo-English text of length N from a small word list.
  function automatic void make_text(output byte unsigned s[], input int seed);
    string words[12] = '{"the ", "string ", "sort ", "linear ", "sorter ", "data ", "is ",
                         "and ", "of ", "a ", "transform ", "unit "};
    int k = 0;
    int w = seed;
    s = new[N];
    while (k < N) begin
      string t;
      w = (w * 1103515245 + 12345) & 32'h7fffffff;
      t = words[(w >> 8) % 12];
      for (int c = 0; c < t.len() && k < N; c++) s[k++] = t[c];
    end
  endfunction

  function automatic void make_fill(output byte unsigned s[], input byte unsigned c,
                                    input int odd_pos, input byte unsigned odd);
    s = new[N];
    foreach (s[i]) s[i] = c;
    if (odd_pos >= 0) s[odd_pos] = odd;
  endfunction

  task automatic report_mechanisms();
    check(n_load_shift  > 0, "mechanism: insertion with shift during load");
    check(n_group_start > 0, "mechanism: group start (one-hot enable)");
    check(n_group_cont  > 0, "mechanism: group continuation (accumulated enable)");
    check(n_subst_shift > 0, "mechanism: in-group shift during substitution");
    check(n_set_max     > 0, "mechanism: MAX_VALUE load of tied CUs");
    check(n_multi_group > 0, "mechanism: several groups in one iteration");
    check(n_done_clean  > 0, "mechanism: completion with no ties");
    check(n_round_hold  > 0, "mechanism: round_done held after completion");
    check(n_first_done  > 0, "mechanism: first sort flagged");
    $display("mechanisms: load_shift=%0d group_start=%0d group_cont=%0d subst_shift=%0d set_max=%0d multi_group=%0d done_clean=%0d done_limit=%0d round_hold=%0d first_done=%0d",
             n_load_shift, n_group_start, n_group_cont, n_subst_shift, n_set_max, n_multi_group,
             n_done_clean, n_done_limit, n_round_hold, n_first_done);
  endtask
