// bisr_ctrl: sequencer of the two-stage test and repair of a memory group.
//
// Stage 1 (parallel): on `test_start` every memory is tested at once by the
// shared BIST. Each wrapper's fault number register (FNR) counts its faults;
// the faults of memory 0, the largest, also go to the BIRA, which then
// analyses and repairs memory 0 right after the test.
// Stage 2 (serial): memories 1..N_MEM-1, in index order (= descending size),
// are classified by their FNR: a fault-free one is skipped, one whose FNR
// shows more faults than its spares could ever cover ends the procedure as
// unrepairable, and a faulty one is tested again alone while the BIRA collects
// its faults, then analysed and repaired.
// Whenever the BIRA reports `unrepair` the running test is aborted and the
// procedure ends with `unrepair` high (the chip is faulty). Otherwise it ends
// with `done` high and `unrepair` low. Both stay until the next `test_start`.
// The sequence is the scheme's; the early abort and the use of the fault count
// to reject a memory before its serial test are this design's choices.
module bisr_ctrl #(
  parameter int unsigned N_MEM = 4,
  localparam int unsigned IDW  = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_start,
  // BIST
  output logic             bist_start,
  output logic             bist_abort,
  input  logic             bist_finish,
  output logic [IDW-1:0]   cur_id,        // memory under test / being repaired
  output logic             parallel,      // stage 1: all memories selected
  output logic [N_MEM-1:0] sel,
  // wrappers
  output logic             fnr_clear,
  output logic             fnr_count_en,
  input  logic [N_MEM-1:0] faulty,
  input  logic [N_MEM-1:0] irreparable,
  // BIRA
  output logic             bira_start,
  output logic             rr_clear,
  input  logic             repair_done,
  input  logic             bira_unrepair,
  // result
  output logic             done,
  output logic             unrepair,
  // event strobes
  output logic             ev_skip,       // a fault-free memory was skipped
  output logic             ev_serial,     // a serial test was started
  output logic             ev_fnr_irrep   // FNR alone showed a memory unrepairable
);

  typedef enum logic [2:0] {S_IDLE, S_PTEST, S_PRA, S_NEXT, S_STEST, S_SRA, S_DONE, S_FAIL} state_e;
  state_e state_q;
  logic [IDW:0] id_q;   // one extra bit to count past the last memory

  logic at_end, start_now;
  assign at_end    = (32'(id_q) >= N_MEM);
  assign start_now = test_start && (state_q == S_IDLE || state_q == S_DONE || state_q == S_FAIL);

  assign cur_id       = start_now ? '0 : id_q[IDW-1:0];
  assign parallel     = (state_q == S_PTEST);
  assign fnr_clear    = start_now;
  assign fnr_count_en = (state_q == S_PTEST);
  assign rr_clear     = start_now;
  assign bist_abort   = bira_unrepair && (state_q == S_PTEST || state_q == S_STEST);
  assign done         = (state_q == S_DONE) || (state_q == S_FAIL);
  assign unrepair     = (state_q == S_FAIL);

  always_comb begin
    sel = '0;
    if (state_q == S_PTEST) sel = '1;
    else if (state_q == S_STEST && !at_end) sel[cur_id] = 1'b1;
  end

  // Stage-2 decision for memory id_q.
  logic go_serial, go_skip, go_fail;
  always_comb begin
    go_serial = 1'b0;
    go_skip   = 1'b0;
    go_fail   = 1'b0;
    if (state_q == S_NEXT && !at_end) begin
      if (irreparable[cur_id])  go_fail   = 1'b1;
      else if (!faulty[cur_id]) go_skip   = 1'b1;
      else                      go_serial = 1'b1;
    end
  end

  assign bist_start   = start_now || go_serial;
  assign bira_start   = start_now || go_serial;
  assign ev_skip      = go_skip;
  assign ev_serial    = go_serial;
  assign ev_fnr_irrep = go_fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      id_q    <= '0;
    end else if (start_now) begin
      state_q <= S_PTEST;
      id_q    <= '0;
    end else begin
      unique case (state_q)
        S_PTEST: if (bist_finish) state_q <= S_PRA;
        S_STEST: if (bist_finish) state_q <= S_SRA;
        S_PRA, S_SRA: begin
          if (bira_unrepair) begin
            state_q <= S_FAIL;
          end else if (repair_done) begin
            state_q <= S_NEXT;
            id_q    <= id_q + 1'b1;
          end
        end
        S_NEXT: begin
          if (at_end)         state_q <= S_DONE;
          else if (go_fail)   state_q <= S_FAIL;
          else if (go_skip)   id_q    <= id_q + 1'b1;
          else if (go_serial) state_q <= S_STEST;
        end
        default: ;
      endcase
    end
  end

endmodule
