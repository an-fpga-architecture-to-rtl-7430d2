// LSBWT: Burrows-Wheeler Transform engine built on a linear sorter.
//
// A string of N characters is fed one character per cycle (in_valid/in_ready).
// Each character is tagged with its index and inserted at its sorted place in
// a chain of N Comparison Units, so the string is sorted by its first
// character when the last one arrives. Runs of equal characters are then
// resolved iteratively: the CUs of every tied group are set to MAX_VALUE and,
// one per cycle, each tied CU's character is replaced by the character x
// places after its index (x = 1, 2, ...; taken from a copy of the string) and
// re-sorted inside its group only. Untied CUs are never touched again. When
// no ties remain the sorted indexes are read out, one per cycle, together
// with their prefix (i-1) mod N and the BWT character at that prefix.
//
// Cycles per string: N (load) + 2 + sum over later iterations of (m_i + 2)
// + N (output), where m_i is the number of tied characters in iteration i.
//
// Interface: in_data is sampled when in_valid && in_ready. out_valid is high
// for exactly N consecutive cycles with no back-pressure; out_primary marks
// the row holding the original string, whose row number is kept in
// primary_idx. first_done and round_done are the round-end indications,
// phase the controller state. rst_n is synchronous and active low.
//
// The fixed length (string length = N) and the gating of comparisons at group
// borders follow the architecture. The internal string copy, the generated
// indexes, the output interface and the stop after N-1 substitution rounds
// (strings with identical rotations) are this design's choices.
module lsbwt_top
  import lsbwt_pkg::*;
#(
  parameter int unsigned N      = lsbwt_pkg::DEF_N,
  parameter int unsigned DATA_W = lsbwt_pkg::DEF_DATA_W,
  localparam int unsigned ID_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned X_W   = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  output logic [ID_W-1:0]   out_id,
  output logic [ID_W-1:0]   out_prefix,
  output logic [DATA_W-1:0] out_char,
  output logic              out_primary,
  output logic [ID_W-1:0]   primary_idx,
  output logic              first_done,
  output logic              round_done,
  output logic              busy,
  output logic [2:0]        phase
);

  phase_e            ph;
  logic              load_en, last_load, set_max, subst, last_subst;
  logic              bwt_done, clear, rd_valid, capture;
  logic [ID_W-1:0]   load_id, rd_idx, rd_id, sel_id;
  logic [X_W-1:0]    sort_cnt;
  logic              sust_any, sust_last, pe_valid;
  logic [ID_W-1:0]   pe_idx;
  logic [N-1:0]      onehot, en, eql, sust, less, eql_q, sust_q;
  logic [DATA_W:0]   cu_data [N];
  logic [ID_W-1:0]   cu_ids  [N];
  logic [DATA_W:0]   bcast_data;
  logic [ID_W-1:0]   bcast_id;
  logic [ID_W:0]     sub_sum;
  logic [ID_W-1:0]   sub_addr;
  logic [DATA_W-1:0] sub_char;

  lsbwt_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .in_valid,
    .sust_any, .sust_last,
    .phase(ph), .in_ready, .load_en, .load_id, .last_load,
    .set_max, .subst, .last_subst, .sort_cnt, .bwt_done,
    .rd_valid, .rd_idx, .clear
  );

  lsbwt_round_end u_round (
    .clk, .clear,
    .last_load, .last_subst, .bwt_done,
    .first_done, .pulse(capture), .round_done
  );

  lsbwt_flag_reg #(.N(N)) u_flags (
    .clk, .clear, .capture,
    .eql_in(eql), .sust_in(sust),
    .clr_en(subst), .clr_mask(onehot),
    .eql_q, .sust_q, .sust_any, .sust_last
  );

  lsbwt_prio_enc #(.N(N)) u_pe (
    .req(sust_q), .idx(pe_idx), .valid(pe_valid)
  );

  lsbwt_onehot_dec #(.N(N)) u_dec (
    .idx(pe_idx), .valid(pe_valid && subst), .onehot
  );

  lsbwt_enable_mux #(.N(N)) u_en (
    .clk, .clear,
    .load_all(load_en), .subst, .onehot,
    .eql_sel(eql_q[pe_idx]), .en
  );

  // Character x places after the selected index, wrapping around the string.
  assign sub_sum  = {1'b0, sel_id} + (ID_W + 1)'(sort_cnt);
  assign sub_addr = (sub_sum >= (ID_W + 1)'(N)) ? ID_W'(sub_sum - (ID_W + 1)'(N))
                                                : ID_W'(sub_sum);

  lsbwt_str_mem #(.N(N), .DATA_W(DATA_W)) u_mem (
    .clk,
    .we(load_en), .waddr(load_id), .wdata(in_data),
    .raddr_a(sub_addr), .rdata_a(sub_char),
    .raddr_b(out_prefix), .rdata_b(out_char)
  );

  assign bcast_data = subst ? {1'b0, sub_char} : {1'b0, in_data};
  assign bcast_id   = subst ? sel_id : load_id;

  lsbwt_cu_array #(.N(N), .DATA_W(DATA_W)) u_array (
    .clk, .clear,
    .en, .set_max({N{set_max}} & sust_q), .capture,
    .data_in(bcast_data), .id_in(bcast_id),
    .sel(onehot), .sel_id,
    .rd_idx, .rd_id,
    .eql, .sust, .less,
    .data(cu_data), .ids(cu_ids)
  );

  lsbwt_prefix_out #(.N(N)) u_prefix (
    .clk, .clear(!rst_n),
    .valid(rd_valid), .row(rd_idx), .id(rd_id),
    .prefix(out_prefix), .primary(out_primary), .primary_idx
  );

  assign out_valid = rd_valid;
  assign out_id    = rd_id;
  assign busy      = !in_ready;
  assign phase     = ph;

endmodule
