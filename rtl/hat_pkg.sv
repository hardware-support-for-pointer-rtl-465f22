// hat_pkg: types and constants shared by the hardware access table (HAT)
// blocks. The operation codes on the request queue follow the monitor state
// diagram (0 = remove, 1 = insert, 2 = find). Key and word widths are one
// 32-bit machine word, the element size the design uses for the specialised
// HAT; the empty-slot marker in overflow lines is this design's own choice.
package hat_pkg;

  localparam int unsigned WORD_W = 32;

  // Request type codes as written into the request queue.
  localparam logic [WORD_W-1:0] QCODE_REMOVE = 32'd0;
  localparam logic [WORD_W-1:0] QCODE_INSERT = 32'd1;
  localparam logic [WORD_W-1:0] QCODE_FIND   = 32'd2;

  // Operations understood by the HAT core.
  typedef enum logic [1:0] {
    HAT_FIND   = 2'd0,
    HAT_INSERT = 2'd1,
    HAT_REMOVE = 2'd2
  } hat_op_e;

  // A slot of an overflow line whose key equals this value is empty.
  localparam logic [WORD_W-1:0] EMPTY_KEY = '1;

  // Pulses the HAT core raises once per event, for performance counting.
  typedef struct packed {
    logic hit;         // lookup hit in the HAT cache
    logic line_read;   // one overflow line read from the L2
    logic ovf_found;   // key found in the overflow chain
    logic writeback;   // evicted element written to overflow memory
    logic alloc;       // new overflow line allocated
    logic dropped;     // element lost because overflow memory ran out
  } hat_events_t;

endpackage
