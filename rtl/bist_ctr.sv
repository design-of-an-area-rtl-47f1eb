// bist_ctr: controller (CTR) of the March X BIST.
//
// On `start` it walks the four March X elements; in each element it visits every
// address from the TAG and issues the element's operations at that address, one
// operation per cycle. `stall` (from the redundancy analyser, whose fault buffer
// is nearly full) holds the sequence without issuing. `test_abort` stops the test
// early, as when the memory under test is already known to be unrepairable.
// After the last operation the controller waits FLUSH_CYC cycles for the read
// pipeline (memory read, compare, fault report) to empty, then pulses
// `test_finish`. Without stalls a test of W words takes 6*W + FLUSH_CYC + 1
// cycles from `start` to `test_finish`. The stall, the abort and the flush
// are this design's additions around the scheme's controller.
module bist_ctr
  import bisr_pkg::*;
#(
  parameter int unsigned FLUSH_CYC = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stall,
  input  logic        test_abort,
  // to/from TPG
  output march_elem_e elem,
  output logic        op_idx,
  input  logic        last_op,
  input  logic        next_dir_down,  // direction of element elem+1
  // to/from TAG
  output logic        tag_load,
  output logic        tag_load_down,
  output logic        tag_step,
  input  logic        tag_at_end,
  // status
  output logic        issue,          // an operation is issued this cycle
  output logic        busy,
  output logic        test_finish     // one-cycle pulse at the end of the test
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_e;
  state_e state_q;
  logic [$clog2(FLUSH_CYC+1)-1:0] flush_q;

  assign issue = (state_q == S_RUN) && !stall && !test_abort;
  assign busy  = (state_q != S_IDLE);

  always_comb begin
    tag_load      = 1'b0;
    tag_load_down = 1'b0;
    tag_step      = 1'b0;
    if (state_q == S_IDLE && start) begin
      tag_load = 1'b1;              // M0 runs upwards
    end else if (issue && last_op) begin
      if (tag_at_end) begin
        tag_load      = (elem != ELEM_M3);
        tag_load_down = next_dir_down;
      end else begin
        tag_step = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      elem        <= ELEM_M0;
      op_idx      <= 1'b0;
      flush_q     <= '0;
      test_finish <= 1'b0;
    end else begin
      test_finish <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_RUN;
          elem    <= ELEM_M0;
          op_idx  <= 1'b0;
        end
        S_RUN: begin
          if (test_abort) begin
            state_q <= S_FLUSH;
            flush_q <= '0;
          end else if (issue) begin
            if (!last_op) begin
              op_idx <= 1'b1;
            end else begin
              op_idx <= 1'b0;
              if (tag_at_end) begin
                if (elem == ELEM_M3) begin
                  state_q <= S_FLUSH;
                  flush_q <= '0;
                end else begin
                  elem <= march_elem_e'(elem + 2'd1);
                end
              end
            end
          end
        end
        S_FLUSH: begin
          if (32'(flush_q) == FLUSH_CYC - 1) begin
            state_q     <= S_IDLE;
            test_finish <= 1'b1;
          end else begin
            flush_q <= flush_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
