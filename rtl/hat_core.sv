// hat_core: the hardware access table (HAT), an associative table of keys
// (and, in the generic variant, one data word per key) that sits next to the
// L2 cache and accelerates the Find / Insert / Remove operations of a hash
// table.
//
// How it works
//   * The cache part is SETS x 4 ways. The set is the low log2(SETS) bits of
//     the key (the document's "mask of bits 0 through x-1"). A lookup compares
//     the four ways of the set in parallel in one cycle (hat_compare).
//   * Every set owns an overflow pointer: the physical address of the first
//     line of a linked chain of overflow lines in a pinned region of memory
//     that is reached through the L2 cache. A line holds SLOTS elements; its
//     last word is the address of the next line of the chain (0 = end).
//     Elements are one word (key) in the specialised HAT (GENERIC = 0) and
//     two words (key, data) in the generic HAT (GENERIC = 1), so a 64-byte
//     line holds 15 or 7 elements.
//   * On a cache miss the chain is walked: each line is read into the line
//     buffer and searched four slots per cycle by the same comparators, while
//     the walk ends at a match or at the end of the chain.
//   * A line is allocated from the region (a bump allocator, lines are never
//     returned) and initialised each time a set's chain has no empty slot
//     left for an evicted element. When the region is used up the element is
//     dropped and ovf_exhausted is raised; the table keeps working, with the
//     loss of accuracy the document accepts for that case.
//   * EXCLUSION = 1 (the default) keeps an element in only one of the cache
//     and the overflow memory: a Find that hits in overflow moves the element
//     into the cache, every evicted element is written back, to the first
//     empty slot of the chain, and a Remove that hits in the cache is
//     complete at once. EXCLUSION = 0 is the inclusion algorithm: overflow
//     hits are copied into the cache, only dirty (newly inserted) elements
//     are written back, and a Remove that hits a clean element also clears
//     its overflow copy. A Remove of a dirty element never searches overflow.
//     Inclusion is supported for the tag-only variant only.
//   * The specialised HAT receives an Insert only once per ID, so an Insert
//     that misses is placed in the cache without searching overflow. The
//     generic HAT searches overflow on an Insert miss so that a key is never
//     stored twice; an Insert with data 0 (NULL) acts as a Remove.
//
// Interface and timing
//   req_valid/req_ready: one operation at a time, accepted only when idle.
//   resp_valid pulses once per operation: resp_ok = key found (Find, Remove)
//   or stored (Insert), resp_data = data of a found key (generic) or 0.
//   A cache hit answers two cycles after acceptance (one cycle of table
//   access, one to register the answer). Writebacks that follow an answer
//   keep the core busy after resp_valid.
//   L2 port: req_valid/req_ready with req_we; a read returns one whole line on
//   l2_resp_valid, in order, any number of cycles later. Writes get no reply.
//   Keys equal to all ones are reserved as the empty-slot marker.
//
// Followed from the document: 4-way sets, set index from the low key bits,
// per-set overflow pointers, line buffer searched 4 entries per cycle, next
// pointer in the last line entry, single-line allocation from memory reserved
// at start-up, inclusion and exclusion policies, the dirty-delete shortcut.
// Own choices: LRU replacement order, the empty-slot marker, line layout of
// key/data pairs, the bump allocator and the L2 handshake.
module hat_core
  import hat_pkg::*;
#(
  parameter bit              GENERIC    = 1'b0,   // 1: key + data elements
  parameter bit              EXCLUSION  = 1'b1,   // 0: inclusion algorithm
  parameter int unsigned     SETS       = 64,     // 256 elements / 4 ways
  parameter int unsigned     LINE_BYTES = 64,
  parameter int unsigned     ADDR_W     = 32,
  parameter logic [31:0]     OVF_BASE   = 32'h0040_0000,
  parameter int unsigned     OVF_LINES  = 65536   // 4 MB page / 64 B lines
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // operation request
  input  logic                          req_valid,
  output logic                          req_ready,
  input  hat_op_e                       req_op,
  input  logic [WORD_W-1:0]             req_key,
  input  logic [WORD_W-1:0]             req_data,
  // operation response
  output logic                          resp_valid,
  output logic                          resp_ok,
  output logic [WORD_W-1:0]             resp_data,
  // L2 cache port for overflow lines
  output logic                          l2_req_valid,
  input  logic                          l2_req_ready,
  output logic                          l2_req_we,
  output logic [ADDR_W-1:0]             l2_req_addr,
  output logic [LINE_BYTES*8-1:0]       l2_req_wdata,
  input  logic                          l2_resp_valid,
  input  logic [LINE_BYTES*8-1:0]       l2_resp_rdata,
  // status
  output logic                          busy,
  output logic                          ovf_exhausted,
  output hat_events_t                   events
);

  localparam int unsigned WAYS       = 4;
  localparam int unsigned IDX_W      = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned LINE_WORDS = LINE_BYTES / 4;
  localparam int unsigned EW         = GENERIC ? 2 : 1;        // words per element
  localparam int unsigned SLOTS      = (LINE_WORDS - 1) / EW;  // elements per line
  localparam int unsigned NGROUPS    = (SLOTS + WAYS - 1) / WAYS;
  localparam int unsigned GRP_W      = (NGROUPS > 1) ? $clog2(NGROUPS) : 1;
  localparam int unsigned SLOT_W     = $clog2(SLOTS + 1);
  localparam int unsigned CNT_W      = $clog2(OVF_LINES + 1);

  typedef logic [WORD_W-1:0] word_t;
  typedef word_t [LINE_WORDS-1:0] line_t;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_RD_REQ, S_RD_WAIT, S_SCAN, S_FOUND, S_NOTFOUND,
    S_WRITE, S_WB_START, S_WB_PLACE, S_WB_FRESH
  } state_e;

  // ---------------------------------------------------------------- storage
  logic [WAYS-1:0]             tag_valid [SETS];
  logic [WAYS-1:0]             tag_dirty [SETS];
  word_t [WAYS-1:0]            tag_key   [SETS];
  word_t [WAYS-1:0]            tag_data  [SETS];
  logic [WAYS-1:0][1:0]        tag_age   [SETS];   // 0 = most recently used
  logic [ADDR_W-1:0]           ovf_ptr   [SETS];

  line_t                       linebuf;            // buffer B
  logic [ADDR_W-1:0]           alloc_next;
  logic [CNT_W-1:0]            alloc_count;

  // ------------------------------------------------------------ op context
  state_e                      state, wr_next;
  hat_op_e                     op;
  word_t                       key, data;
  logic [IDX_W-1:0]            set;
  logic                        purge;              // inclusion: clear overflow copy
  logic                        wb_mode;            // chain walk for a writeback
  logic [ADDR_W-1:0]           cur_addr, wr_addr, fresh_addr;
  logic [GRP_W-1:0]            grp;
  logic                        empty_before;       // empty slot in an earlier line
  logic [SLOT_W-1:0]           found_slot;
  word_t                       vic_key, vic_data;
  logic                        touch_pend;         // LRU update pending
  logic [IDX_W-1:0]            touch_set;
  logic [1:0]                  touch_way;

  // ----------------------------------------------------------- comparators
  logic [WAYS-1:0]             cmp_match;
  logic                        cmp_any;
  word_t [WAYS-1:0]            buf_keys;
  logic [WAYS-1:0]             buf_valid;

  always_comb begin
    for (int l = 0; l < WAYS; l++) begin
      int unsigned s;
      s = int'(grp) * WAYS + l;
      if (s < SLOTS) begin
        buf_keys[l]  = linebuf[s*EW];
        buf_valid[l] = linebuf[s*EW] != EMPTY_KEY;
      end else begin
        buf_keys[l]  = EMPTY_KEY;
        buf_valid[l] = 1'b0;
      end
    end
  end

  hat_compare #(.KEY_W(WORD_W), .LANES(WAYS)) u_cmp (
    .sel_buf   (state == S_SCAN),
    .key       (key),
    .set_keys  (tag_key[set]),
    .set_valid (tag_valid[set]),
    .buf_keys  (buf_keys),
    .buf_valid (buf_valid),
    .match     (cmp_match),
    .any_match (cmp_any)
  );

  // ------------------------------------------------- combinational helpers
  logic [1:0]        hit_way, vic_way;
  logic              vic_has_free;
  logic              line_has_empty;
  logic [SLOT_W-1:0] first_empty;
  logic [SLOT_W-1:0] first_empty_mod;   // first empty once found_slot is cleared
  logic [ADDR_W-1:0] line_next;
  logic              alloc_ok;
  hat_op_e           eff_op;

  always_comb begin
    hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) if (cmp_match[w]) hit_way = 2'(w);

    vic_way      = '0;
    vic_has_free = 1'b0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!tag_valid[set][w]) begin
        vic_way      = 2'(w);
        vic_has_free = 1'b1;
      end
    end
    if (!vic_has_free)
      for (int w = 0; w < WAYS; w++) if (tag_age[set][w] == 2'd3) vic_way = 2'(w);

    line_has_empty = 1'b0;
    first_empty    = '0;
    for (int s = SLOTS - 1; s >= 0; s--) begin
      if (linebuf[s*EW] == EMPTY_KEY) begin
        line_has_empty = 1'b1;
        first_empty    = SLOT_W'(s);
      end
    end
    first_empty_mod = (line_has_empty && first_empty < found_slot) ? first_empty : found_slot;

    line_next = linebuf[LINE_WORDS-1][ADDR_W-1:0];
    alloc_ok  = alloc_count < CNT_W'(OVF_LINES);
    eff_op    = (GENERIC && op == HAT_INSERT && data == '0) ? HAT_REMOVE : op;
  end

  // ------------------------------------------------------------- L2 port
  assign l2_req_valid = (state == S_RD_REQ) || (state == S_WRITE);
  assign l2_req_we    = (state == S_WRITE);
  assign l2_req_addr  = (state == S_WRITE) ? wr_addr : cur_addr;
  assign l2_req_wdata = linebuf;

  assign req_ready     = (state == S_IDLE);
  assign busy          = (state != S_IDLE);

  // ------------------------------------------------------------ functions
  function automatic line_t fresh_line(input word_t k, input word_t d);
    line_t l;
    l = '0;
    for (int s = 0; s < SLOTS; s++) l[s*EW] = EMPTY_KEY;
    l[0] = k;
    if (GENERIC) l[1] = d;
    return l;
  endfunction

  // ------------------------------------------------------------ main FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      wr_next       <= S_IDLE;
      op            <= HAT_FIND;
      key           <= '0;
      data          <= '0;
      set           <= '0;
      purge         <= 1'b0;
      wb_mode       <= 1'b0;
      cur_addr      <= '0;
      wr_addr       <= '0;
      fresh_addr    <= '0;
      grp           <= '0;
      empty_before  <= 1'b0;
      found_slot    <= '0;
      vic_key       <= '0;
      vic_data      <= '0;
      linebuf       <= '0;
      alloc_next    <= ADDR_W'(OVF_BASE);
      alloc_count   <= '0;
      ovf_exhausted <= 1'b0;
      resp_valid    <= 1'b0;
      resp_ok       <= 1'b0;
      resp_data     <= '0;
      events        <= '0;
      touch_pend    <= 1'b0;
      touch_set     <= '0;
      touch_way     <= '0;
      for (int i = 0; i < SETS; i++) begin
        tag_valid[i] <= '0;
        tag_dirty[i] <= '0;
        tag_key[i]   <= '0;
        tag_data[i]  <= '0;
        ovf_ptr[i]   <= '0;
      end
    end else begin
      resp_valid <= 1'b0;
      events     <= '0;
      touch_pend <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            op      <= req_op;
            key     <= req_key;
            data    <= GENERIC ? req_data : '0;
            set     <= (SETS > 1) ? IDX_W'(req_key) : '0;
            purge   <= 1'b0;
            wb_mode <= 1'b0;
            state   <= S_LOOKUP;
          end
        end

        S_LOOKUP: begin
          if (cmp_any) begin
            events.hit <= 1'b1;
            touch(set, hit_way);
            unique case (eff_op)
              HAT_FIND: begin
                respond(1'b1, GENERIC ? tag_data[set][hit_way] : '0);
                state <= S_IDLE;
              end
              HAT_INSERT: begin
                if (GENERIC) tag_data[set][hit_way] <= data;
                tag_dirty[set][hit_way] <= 1'b1;
                respond(1'b1, '0);
                state <= S_IDLE;
              end
              default: begin  // remove
                tag_valid[set][hit_way] <= 1'b0;
                respond(1'b1, '0);
                if (EXCLUSION || tag_dirty[set][hit_way] || ovf_ptr[set] == '0) begin
                  state <= S_IDLE;
                end else begin
                  purge        <= 1'b1;
                  cur_addr     <= ovf_ptr[set];
                  empty_before <= 1'b0;
                  state        <= S_RD_REQ;
                end
              end
            endcase
          end else if (!GENERIC && eff_op == HAT_INSERT) begin
            install(key, data, 1'b1);
            respond(1'b1, '0);
            state <= need_wb() ? S_WB_START : S_IDLE;
          end else if (ovf_ptr[set] == '0) begin
            state <= S_NOTFOUND;
          end else begin
            cur_addr     <= ovf_ptr[set];
            empty_before <= 1'b0;
            state        <= S_RD_REQ;
          end
        end

        S_RD_REQ: begin
          if (l2_req_ready) begin
            events.line_read <= 1'b1;
            state            <= S_RD_WAIT;
          end
        end

        S_RD_WAIT: begin
          if (l2_resp_valid) begin
            linebuf <= l2_resp_rdata;
            grp     <= '0;
            state   <= wb_mode ? S_WB_PLACE : S_SCAN;
          end
        end

        S_SCAN: begin
          if (cmp_any) begin
            found_slot <= SLOT_W'(int'(grp) * WAYS + int'(first_lane(cmp_match)));
            state      <= S_FOUND;
          end else if (int'(grp) == NGROUPS - 1) begin
            if (line_next != '0) begin
              empty_before <= empty_before | line_has_empty;
              cur_addr     <= line_next;
              state        <= S_RD_REQ;
            end else begin
              state <= S_NOTFOUND;
            end
          end else begin
            grp <= grp + 1'b1;
          end
        end

        S_FOUND: begin
          events.ovf_found <= 1'b1;
          wr_addr          <= cur_addr;
          wr_next          <= S_IDLE;
          if (purge) begin
            linebuf[found_slot*EW] <= EMPTY_KEY;
            state                  <= S_WRITE;
          end else if (eff_op == HAT_REMOVE) begin
            linebuf[found_slot*EW] <= EMPTY_KEY;
            respond(1'b1, '0);
            state <= S_WRITE;
          end else if (EXCLUSION) begin
            // move the element into the cache, free its overflow slot
            install(key, (eff_op == HAT_FIND) ? linebuf[found_slot*EW + EW - 1] : data,
                    eff_op == HAT_INSERT);
            respond(1'b1, (GENERIC && eff_op == HAT_FIND) ? linebuf[found_slot*EW + EW - 1] : '0);
            linebuf[found_slot*EW] <= EMPTY_KEY;
            if (need_wb() && !empty_before) begin
              // the first empty slot of the chain is in this line
              linebuf[first_empty_mod*EW] <= tag_key[set][vic_way];
              if (GENERIC) linebuf[first_empty_mod*EW + 1] <= tag_data[set][vic_way];
              events.writeback <= 1'b1;
            end else if (need_wb()) begin
              wr_next <= S_WB_START;
            end
            state <= S_WRITE;
          end else begin
            // inclusion: keep the overflow copy, cache a clean copy
            install(key, linebuf[found_slot*EW + EW - 1], 1'b0);
            respond(1'b1, '0);
            state <= need_wb() ? S_WB_START : S_IDLE;
          end
        end

        S_NOTFOUND: begin
          if (purge) begin
            state <= S_IDLE;
          end else if (GENERIC && eff_op == HAT_INSERT) begin
            install(key, data, 1'b1);
            respond(1'b1, '0);
            state <= need_wb() ? S_WB_START : S_IDLE;
          end else begin
            respond(1'b0, '0);
            state <= S_IDLE;
          end
        end

        S_WRITE: begin
          if (l2_req_ready) state <= wr_next;
        end

        S_WB_START: begin
          wb_mode <= 1'b1;
          if (ovf_ptr[set] == '0) begin
            if (alloc_ok) begin
              ovf_ptr[set] <= alloc_next;
              allocate();
              linebuf          <= fresh_line(vic_key, vic_data);
              events.writeback <= 1'b1;
              wr_addr          <= alloc_next;
              wr_next          <= S_IDLE;
              state            <= S_WRITE;
            end else begin
              drop();
              state <= S_IDLE;
            end
          end else begin
            cur_addr <= ovf_ptr[set];
            state    <= S_RD_REQ;
          end
        end

        S_WB_PLACE: begin
          if (line_has_empty) begin
            linebuf[first_empty*EW] <= vic_key;
            if (GENERIC) linebuf[first_empty*EW + 1] <= vic_data;
            events.writeback <= 1'b1;
            wr_addr          <= cur_addr;
            wr_next          <= S_IDLE;
            state            <= S_WRITE;
          end else if (line_next != '0) begin
            cur_addr <= line_next;
            state    <= S_RD_REQ;
          end else if (alloc_ok) begin
            // link a new line after the last one, then write the new line
            linebuf[LINE_WORDS-1] <= WORD_W'(alloc_next);
            fresh_addr            <= alloc_next;
            allocate();
            wr_addr <= cur_addr;
            wr_next <= S_WB_FRESH;
            state   <= S_WRITE;
          end else begin
            drop();
            state <= S_IDLE;
          end
        end

        S_WB_FRESH: begin
          linebuf          <= fresh_line(vic_key, vic_data);
          events.writeback <= 1'b1;
          wr_addr          <= fresh_addr;
          wr_next          <= S_IDLE;
          state            <= S_WRITE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // -------------------------------------------------- LRU replacement ages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++)
        for (int w = 0; w < WAYS; w++) tag_age[i][w] <= 2'(w);
    end else if (touch_pend) begin
      for (int w = 0; w < WAYS; w++) begin
        if (w == int'(touch_way))
          tag_age[touch_set][w] <= 2'd0;
        else if (tag_age[touch_set][w] < tag_age[touch_set][touch_way])
          tag_age[touch_set][w] <= tag_age[touch_set][w] + 2'd1;
      end
    end
  end

  // ------------------------------------------------- tasks used by the FSM
  // Victim of the current set needs to be written back if installing evicts it.
  function automatic logic need_wb();
    return !vic_has_free && (EXCLUSION || tag_dirty[set][vic_way]);
  endfunction

  function automatic logic [1:0] first_lane(input logic [WAYS-1:0] m);
    logic [1:0] r;
    r = '0;
    for (int l = WAYS - 1; l >= 0; l--) if (m[l]) r = 2'(l);
    return r;
  endfunction

  // The LRU ages of the set are updated one cycle after the access that
  // used the way; the next lookup of any set is at least two cycles later.
  task automatic touch(input logic [IDX_W-1:0] s, input logic [1:0] w);
    touch_pend <= 1'b1;
    touch_set  <= s;
    touch_way  <= w;
  endtask

  task automatic install(input word_t k, input word_t d, input logic dirty);
    if (need_wb()) begin
      vic_key     <= tag_key[set][vic_way];
      vic_data    <= tag_data[set][vic_way];
    end
    tag_valid[set][vic_way] <= 1'b1;
    tag_dirty[set][vic_way] <= dirty;
    tag_key[set][vic_way]   <= k;
    tag_data[set][vic_way]  <= GENERIC ? d : '0;
    touch(set, vic_way);
  endtask

  task automatic respond(input logic ok, input word_t d);
    resp_valid <= 1'b1;
    resp_ok    <= ok;
    resp_data  <= d;
  endtask

  task automatic allocate();
    alloc_next     <= alloc_next + ADDR_W'(LINE_BYTES);
    alloc_count    <= alloc_count + 1'b1;
    events.alloc   <= 1'b1;
  endtask

  task automatic drop();
    ovf_exhausted  <= 1'b1;
    events.dropped <= 1'b1;
  endtask

  // --------------------------------------------------------- assertions
  initial begin
    assert (EXCLUSION || !GENERIC)
      else $error("hat_core: the inclusion algorithm is supported for the tag-only HAT only");
    assert (LINE_WORDS >= EW + 1) else $error("hat_core: line too small");
  end

  a_key_not_empty: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_ready) |-> req_key != EMPTY_KEY);
  a_l2_wait_no_req: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_RD_WAIT |-> !l2_req_valid);

endmodule
