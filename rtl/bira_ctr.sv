// bira_ctr: controller (CTR) of the built-in redundancy analyser (BIRA).
//
// Collection phase (after `start`, while the BIST runs): every cell fault from
// the multi fault detector is
//   - dropped if it lies on a row or column that already has a spare, or if it
//     is already stored;
//   - otherwise, if the must-repair counter says so, given a spare row (or
//     column) at once, and the stored faults on that line are removed;
//   - otherwise stored; a full store means the memory cannot be repaired.
// With DEPTH = 2*SPARE_ROWS*SPARE_COLS that last rule is exact: after
// must-repair no row holds more faults than there are spare columns and no
// column more than there are spare rows, so r rows and c columns can cover at
// most r*SPARE_COLS + c*SPARE_ROWS <= 2*SPARE_ROWS*SPARE_COLS stored faults.
// A missing spare for a must-repair line also means unrepairable.
//
// Analysis phase (once `test_finish` was seen and the fault queue is empty): an
// exhaustive search over every order in which the free spares can be used.
// An order is a bit mask of length F = free rows + free columns with exactly
// (free rows) ones, a 1 meaning "spare row". For a mask, the stored faults are
// walked one per cycle; the first one not yet covered takes the next spare of
// the order (its row or its column). If every fault is covered the mask is a
// repair solution; if the spares run out the next mask is tried. Every
// solution is reached by some order, so the search finds a repair whenever one
// exists. Masks of the wrong weight are skipped in one cycle each. Worst case
// 2^(SPARE_ROWS+SPARE_COLS) * (DEPTH+1) cycles.
//
// Results: on success the solution is written to the repair registers and
// `repair_done` pulses; on failure `unrepair` goes high and stays high until the
// next `start`. The scheme calls for a must-repair check and an exhaustive
// search of spare row/column combinations; the exact must-repair rule, the
// store size and the order-based serial search are this design's circuits.
module bira_ctr #(
  parameter int unsigned N_MEM      = 4,
  parameter int unsigned ROW_W      = 6,
  parameter int unsigned CID_W      = 5,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  parameter int unsigned DEPTH      = 2 * SPARE_ROWS * SPARE_COLS,
  parameter int unsigned CNT_W      = $clog2(DEPTH + 2),
  localparam int unsigned IDW       = (N_MEM > 1) ? $clog2(N_MEM) : 1,
  localparam int unsigned NSP       = SPARE_ROWS + SPARE_COLS
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic [IDW-1:0]                   start_mem_id,
  input  logic                             test_finish,
  // cell faults from the multi fault detector
  input  logic                             f_valid,
  input  logic [ROW_W-1:0]                 f_row,
  input  logic [CID_W-1:0]                 f_col,
  input  logic                             mfd_idle,
  // must-repair counter
  output logic [CNT_W-1:0]                 rows_left,
  output logic [CNT_W-1:0]                 cols_left,
  input  logic                             dup,
  input  logic                             must_row,
  input  logic                             must_col,
  // fault storing
  output logic                             st_clear,
  output logic                             st_ins,
  output logic                             st_kill_row,
  output logic                             st_kill_col,
  input  logic [DEPTH-1:0]                 st_valid,
  input  logic [DEPTH-1:0][ROW_W-1:0]      st_row,
  input  logic [DEPTH-1:0][CID_W-1:0]      st_col,
  input  logic                             st_full,
  // repair registers
  output logic                             rr_we,
  output logic [IDW-1:0]                   rr_mem_id,
  output logic [SPARE_ROWS-1:0][ROW_W-1:0] sol_row,
  output logic [SPARE_ROWS-1:0]            sol_row_v,
  output logic [SPARE_COLS-1:0][CID_W-1:0] sol_col,
  output logic [SPARE_COLS-1:0]            sol_col_v,
  // status
  output logic                             busy,
  output logic                             repair_done,
  output logic                             unrepair,
  output logic                             ev_must_row,   // a must-repair row was taken
  output logic                             ev_must_col    // a must-repair column was taken
);

  typedef enum logic [2:0] {S_IDLE, S_COLLECT, S_SEARCH, S_COMMIT, S_UNREP} state_e;
  state_e state_q;
  logic   fin_q;

  // working solution (must-repair spares) and trial solution (search)
  logic [SPARE_ROWS-1:0][ROW_W-1:0] w_row, t_row;
  logic [SPARE_ROWS-1:0]            w_row_v, t_row_v;
  logic [SPARE_COLS-1:0][CID_W-1:0] w_col, t_col;
  logic [SPARE_COLS-1:0]            w_col_v, t_col_v;

  logic [NSP:0]                 mask_q;     // one extra bit marks "all masks tried"
  logic [$clog2(DEPTH+1)-1:0]   j_q;        // entry being walked
  logic [$clog2(NSP+1)-1:0]     k_q;        // spares of the order used so far

  function automatic logic covered(logic [ROW_W-1:0] r, logic [CID_W-1:0] c,
      logic [SPARE_ROWS-1:0][ROW_W-1:0] rr, logic [SPARE_ROWS-1:0] rv,
      logic [SPARE_COLS-1:0][CID_W-1:0] cc, logic [SPARE_COLS-1:0] cv);
    logic hit = 1'b0;
    for (int i = 0; i < int'(SPARE_ROWS); i++) if (rv[i] && rr[i] == r) hit = 1'b1;
    for (int i = 0; i < int'(SPARE_COLS); i++) if (cv[i] && cc[i] == c) hit = 1'b1;
    return hit;
  endfunction

  function automatic logic [CNT_W-1:0] zeros(logic [NSP-1:0] v, int unsigned n);
    logic [CNT_W-1:0] z = '0;
    for (int i = 0; i < int'(n); i++) if (!v[i]) z = z + 1'b1;
    return z;
  endfunction

  assign rows_left = zeros(NSP'(w_row_v), SPARE_ROWS);
  assign cols_left = zeros(NSP'(w_col_v), SPARE_COLS);

  // Mask validity: exactly rows_left ones among the low F bits, nothing above.
  logic [CNT_W:0] nfree;
  logic           mask_ok;
  logic           t_next_row;   // spare type the order gives for step k_q
  always_comb begin
    logic [CNT_W:0] ones;
    nfree = (CNT_W+1)'(rows_left) + (CNT_W+1)'(cols_left);
    ones  = '0;
    mask_ok = !mask_q[NSP];
    for (int i = 0; i < int'(NSP); i++) begin
      if (i < int'(nfree)) ones = ones + (CNT_W+1)'(mask_q[i]);
      else if (mask_q[i]) mask_ok = 1'b0;
    end
    if (ones != (CNT_W+1)'(rows_left)) mask_ok = 1'b0;
    t_next_row = mask_q[k_q];
  end

  // Current search entry and whether it still needs a spare.
  logic need;
  logic [$clog2(DEPTH)-1:0] j_idx;
  assign j_idx = j_q[$clog2(DEPTH)-1:0];
  logic [ROW_W-1:0] e_row;
  logic [CID_W-1:0] e_col;
  always_comb begin
    e_row = '0;
    e_col = '0;
    need  = 1'b0;
    if (32'(j_q) < DEPTH) begin
      e_row = st_row[j_idx];
      e_col = st_col[j_idx];
      need  = st_valid[j_idx] && !covered(e_row, e_col, t_row, t_row_v, t_col, t_col_v);
    end
  end

  // Collection decisions for the fault on the input.
  logic in_cov, take_row, take_col, do_ins, go_unrep;
  always_comb begin
    in_cov   = covered(f_row, f_col, w_row, w_row_v, w_col, w_col_v);
    take_row = 1'b0;
    take_col = 1'b0;
    do_ins   = 1'b0;
    go_unrep = 1'b0;
    if (state_q == S_COLLECT && f_valid && !in_cov && !dup) begin
      if (must_row) begin
        if (rows_left == '0) go_unrep = 1'b1; else take_row = 1'b1;
      end else if (must_col) begin
        if (cols_left == '0) go_unrep = 1'b1; else take_col = 1'b1;
      end else if (st_full) begin
        go_unrep = 1'b1;
      end else begin
        do_ins = 1'b1;
      end
    end
  end

  assign st_clear    = start;
  assign st_ins      = do_ins;
  assign st_kill_row = take_row;
  assign st_kill_col = take_col;
  assign ev_must_row = take_row;
  assign ev_must_col = take_col;
  assign busy        = (state_q == S_COLLECT) || (state_q == S_SEARCH) || (state_q == S_COMMIT);
  assign unrepair    = (state_q == S_UNREP);
  assign sol_row     = t_row;
  assign sol_row_v   = t_row_v;
  assign sol_col     = t_col;
  assign sol_col_v   = t_col_v;
  assign rr_we       = (state_q == S_COMMIT);

  function automatic int first_free(logic [NSP-1:0] v, int unsigned n);
    int f = 0;
    for (int i = int'(n) - 1; i >= 0; i--) if (!v[i]) f = i;
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      fin_q       <= 1'b0;
      rr_mem_id   <= '0;
      w_row       <= '0;
      w_row_v     <= '0;
      w_col       <= '0;
      w_col_v     <= '0;
      t_row       <= '0;
      t_row_v     <= '0;
      t_col       <= '0;
      t_col_v     <= '0;
      mask_q      <= '0;
      j_q         <= '0;
      k_q         <= '0;
      repair_done <= 1'b0;
    end else begin
      repair_done <= 1'b0;
      if (start) begin
        state_q   <= S_COLLECT;
        fin_q     <= 1'b0;
        rr_mem_id <= start_mem_id;
        w_row_v   <= '0;
        w_col_v   <= '0;
      end else begin
        if (test_finish) fin_q <= 1'b1;
        unique case (state_q)
          S_COLLECT: begin
            if (take_row) begin
              w_row[first_free(NSP'(w_row_v), SPARE_ROWS)]   <= f_row;
              w_row_v[first_free(NSP'(w_row_v), SPARE_ROWS)] <= 1'b1;
            end
            if (take_col) begin
              w_col[first_free(NSP'(w_col_v), SPARE_COLS)]   <= f_col;
              w_col_v[first_free(NSP'(w_col_v), SPARE_COLS)] <= 1'b1;
            end
            if (go_unrep) begin
              state_q <= S_UNREP;
            end else if ((fin_q || test_finish) && mfd_idle && !f_valid) begin
              state_q <= S_SEARCH;
              mask_q  <= '0;
              j_q     <= '0;
              k_q     <= '0;
              t_row   <= w_row;
              t_row_v <= w_row_v;
              t_col   <= w_col;
              t_col_v <= w_col_v;
            end
          end
          S_SEARCH: begin
            if (mask_q[NSP]) begin
              state_q <= S_UNREP;                       // no order works
            end else if (!mask_ok || (need && 32'(k_q) >= 32'(nfree))) begin
              mask_q  <= mask_q + 1'b1;                 // next order
              j_q     <= '0;
              k_q     <= '0;
              t_row   <= w_row;
              t_row_v <= w_row_v;
              t_col   <= w_col;
              t_col_v <= w_col_v;
            end else if (32'(j_q) == DEPTH) begin
              state_q <= S_COMMIT;                      // all faults covered
            end else begin
              if (need) begin
                if (t_next_row) begin
                  t_row[first_free(NSP'(t_row_v), SPARE_ROWS)]   <= e_row;
                  t_row_v[first_free(NSP'(t_row_v), SPARE_ROWS)] <= 1'b1;
                end else begin
                  t_col[first_free(NSP'(t_col_v), SPARE_COLS)]   <= e_col;
                  t_col_v[first_free(NSP'(t_col_v), SPARE_COLS)] <= 1'b1;
                end
                k_q <= k_q + 1'b1;
              end
              j_q <= j_q + 1'b1;
            end
          end
          S_COMMIT: begin
            state_q     <= S_IDLE;
            repair_done <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
