// bisr_pkg: types and constants shared by the built-in self-repair (BISR) blocks.
//
// The BIST runs the March X algorithm, four march elements:
//   M0: up-or-down (w0)   M1: up (r0, w1)   M2: down (r1, w0)   M3: up-or-down (r0)
// M0 and M3 may use either address order; this design runs both upwards.
// An element has at most two operations, selected by a one-bit operation index.
package bisr_pkg;

  // March element index, M0..M3 of March X.
  typedef enum logic [1:0] {
    ELEM_M0 = 2'd0,
    ELEM_M1 = 2'd1,
    ELEM_M2 = 2'd2,
    ELEM_M3 = 2'd3
  } march_elem_e;

  // One March operation as produced by the test pattern generator.
  typedef struct packed {
    logic is_read;   // 1: read and compare, 0: write
    logic data_bit;  // data background (0 or 1), replicated over the word
  } march_op_t;

  // Number of operations of each element of March X.
  function automatic int unsigned march_x_ops(march_elem_e e);
    case (e)
      ELEM_M0: return 1;
      ELEM_M1: return 2;
      ELEM_M2: return 2;
      default: return 1;
    endcase
  endfunction

  // One-cycle strobes of the notable events of a test-and-repair run.
  typedef struct packed {
    logic stall;      // BIST held because the BIRA fault queue is nearly full
    logic multi;      // a word with several faulty bits is being split
    logic must_row;   // a spare row was taken by the must-repair rule
    logic must_col;   // a spare column was taken by the must-repair rule
    logic skip;       // a fault-free memory was left out of stage 2
    logic serial;     // a serial (stage 2) test was started
    logic fnr_irrep;  // a fault count alone proved a memory unrepairable
    logic test_abort;     // a running test was stopped by `unrepair`
  } bisr_events_t;

  // Address order of each element: only M2 walks downwards.
  function automatic logic march_x_down(march_elem_e e);
    return e == ELEM_M2;
  endfunction

endpackage
