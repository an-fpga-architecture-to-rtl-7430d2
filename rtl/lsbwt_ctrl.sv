// Controller of the LSBWT engine.
//
// Phases (lsbwt_pkg::phase_e) and their cycle cost for a string of n = N
// characters, giving the total 2n + 2 + sum_i (m_i + 2) cycles:
//   LOAD     n cycles with in_valid: character number load_id is broadcast to
//            all CUs and sorted in; the last one raises last_load.
//   CAPTURE  1 cycle: the round-end pulse stores EQL and SUST.
//   DECIDE   1 cycle: if no SUST bit is stored, or the sort counter x has
//            reached n (every tie left is between identical rotations), the
//            transform is done (bwt_done) and OUTPUT follows. Otherwise the
//            tied CUs are loaded with MAX_VALUE (set_max) and SUBST follows.
//   SUBST    m_i cycles, one per tied CU: the CU chosen by the priority
//            encoder gets the character x places after its index; the last
//            one (sust_last) raises last_subst, x is incremented and CAPTURE
//            follows.
//   OUTPUT   n cycles: rd_idx walks the sorted rows 0..n-1. In the last one
//            clear empties the CUs for the next string and LOAD follows.
// Reset (rst_n low, synchronous) also drives clear. The phase split is this
// design's; the cycle budget per phase is the architecture's.
module lsbwt_ctrl
  import lsbwt_pkg::*;
#(
  parameter int unsigned N = lsbwt_pkg::DEF_N,
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned X_W  = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            sust_any,   // a stored SUST bit is set
  input  logic            sust_last,  // this substitution empties SUST
  output phase_e          phase,
  output logic            in_ready,
  output logic            load_en,    // a character is accepted this cycle
  output logic [ID_W-1:0] load_id,
  output logic            last_load,
  output logic            set_max,
  output logic            subst,
  output logic            last_subst,
  output logic [X_W-1:0]  sort_cnt,   // x, the substitution offset
  output logic            bwt_done,
  output logic            rd_valid,
  output logic [ID_W-1:0] rd_idx,
  output logic            clear
);

  phase_e phase_n;
  logic   out_last;

  assign in_ready   = (phase == PH_LOAD);
  assign load_en    = in_ready && in_valid;
  assign last_load  = load_en && (load_id == ID_W'(N - 1));
  assign subst      = (phase == PH_SUBST);
  assign last_subst = subst && sust_last;
  assign bwt_done   = (phase == PH_DECIDE) && (!sust_any || sort_cnt == X_W'(N));
  assign set_max    = (phase == PH_DECIDE) && !bwt_done;
  assign rd_valid   = (phase == PH_OUTPUT);
  assign out_last   = rd_valid && (rd_idx == ID_W'(N - 1));
  assign clear      = !rst_n || out_last;

  always_comb begin
    phase_n = phase;
    unique case (phase)
      PH_LOAD:    if (last_load)  phase_n = PH_CAPTURE;
      PH_CAPTURE:                 phase_n = PH_DECIDE;
      PH_DECIDE:  phase_n = bwt_done ? PH_OUTPUT : PH_SUBST;
      PH_SUBST:   if (sust_last)  phase_n = PH_CAPTURE;
      PH_OUTPUT:  if (out_last)   phase_n = PH_LOAD;
      default:                    phase_n = PH_LOAD;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= PH_LOAD;
      load_id  <= '0;
      sort_cnt <= X_W'(1);
      rd_idx   <= '0;
    end else begin
      phase <= phase_n;
      if (load_en)    load_id  <= last_load ? '0 : load_id + 1'b1;
      if (last_subst) sort_cnt <= sort_cnt + 1'b1;
      if (rd_valid)   rd_idx   <= out_last ? '0 : rd_idx + 1'b1;
      if (out_last)   sort_cnt <= X_W'(1);
    end
  end

  // A substitution cycle always has a tied CU to work on.
  a_subst_has_work: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_SUBST) |-> sust_any);

endmodule
