// Shared types, sizes and protocol rules of the SPS2 (split private / shared L2) memory
// hierarchy.
//
// A cache line is tracked in one of six states. The subscript tells whether the line has
// been used by one processor (S1, M1) or by two or more (S2, M2); O is the owned state of
// MOSI. Private caches (PL1, PL2) may hold all six states, the shared L2 (SL2) only I, S2,
// M2 and O. The functions below encode the state graph of the protocol: how a private copy
// reacts to a snooped GetS/GetX, where a victim goes on replacement, what state a filled
// line takes, and how the SL2 merges a line pushed into it (P_SL2). The state graph itself
// follows the protocol description; the exact encodings, the 32-bit physical address, the
// 64-bit processor word and the "shared" response line are this design's own choices.
package sps2_pkg;

  localparam int unsigned ADDR_W     = 32;   // 4 GB physical address space
  localparam int unsigned LINE_BYTES = 64;   // 64-byte cache lines
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned WORD_W     = 64;   // processor load/store width
  localparam int unsigned LADDR_W    = ADDR_W - OFF_W;  // line address width

  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [LADDR_W-1:0] laddr_t;

  // Coherence state of one cache line.
  typedef enum logic [2:0] {
    ST_I  = 3'd0,
    ST_S1 = 3'd1,
    ST_S2 = 3'd2,
    ST_M1 = 3'd3,
    ST_M2 = 3'd4,
    ST_O  = 3'd5
  } cstate_t;

  // Bus commands. GETS/GETX are snooped by every other node and by the SL2; PSL2 moves a
  // line from a private cache into the SL2; PUTM writes a dirty private line to memory.
  typedef enum logic [1:0] {
    BUS_GETS = 2'd0,
    BUS_GETX = 2'd1,
    BUS_PSL2 = 2'd2,
    BUS_PUTM = 2'd3
  } buscmd_t;

  function automatic logic st_valid(cstate_t s);
    return s != ST_I;
  endfunction

  // Holds data newer than memory.
  function automatic logic st_dirty(cstate_t s);
    return s inside {ST_M1, ST_M2, ST_O};
  endfunction

  // Store hits without a bus transaction.
  function automatic logic st_writable(cstate_t s);
    return s inside {ST_M1, ST_M2};
  endfunction

  // A private line evicted from PL1 goes to PL2 when used by one processor only (S1, M1);
  // otherwise (S2, M2, O) it is relocated to the SL2.
  function automatic logic pl1_victim_to_pl2(cstate_t s);
    return s inside {ST_S1, ST_M1};
  endfunction

  // A PL2 victim is simply dropped when clean (S1, S2).
  function automatic logic pl2_victim_drop(cstate_t s);
    return s inside {ST_S1, ST_S2};
  endfunction

  // Next state of a private copy that snoops a command from another node.
  function automatic cstate_t snoop_next(cstate_t s, buscmd_t c);
    cstate_t n;
    n = s;
    if (c == BUS_GETX) begin
      n = ST_I;
    end else if (c == BUS_GETS) begin
      case (s)
        ST_M1, ST_M2, ST_O: n = ST_O;
        ST_S1, ST_S2:       n = ST_S2;
        default:            n = ST_I;
      endcase
    end
    return n;
  endfunction

  // A private copy supplies the line on a snooped GetS/GetX when it holds it dirty.
  function automatic logic snoop_supplies(cstate_t s, buscmd_t c);
    return (c inside {BUS_GETS, BUS_GETX}) && st_dirty(s);
  endfunction

  // State of a line filled into PL1 after a GetS.
  //   SL2 held it M2          -> M2 (the SL2 copy moves to the reader)
  //   some other copy existed -> S2
  //   only memory had it      -> S1
  function automatic cstate_t gets_fill_state(logic sl2_was_m2, logic shared);
    if (sl2_was_m2) return ST_M2;
    if (shared)     return ST_S2;
    return ST_S1;
  endfunction

  // State of a line after a GetX: M1 when no other cache held a copy, M2 otherwise.
  function automatic cstate_t getx_fill_state(logic shared);
    return shared ? ST_M2 : ST_M1;
  endfunction

  // SL2 state after a P_SL2 push of state p onto current SL2 state cur.
  function automatic cstate_t sl2_push_next(cstate_t cur, cstate_t p);
    if (cur == ST_I) return (p == ST_S2) ? ST_S2 : (p == ST_O) ? ST_O : ST_M2;
    if (p == ST_S2)  return cur;          // SL2 already holds it: clean copy dropped
    return ST_O;                          // dirty push over a clean SL2 copy
  endfunction

  // SL2 state after it serves a GetS (M2 moves out) or a GetX (always invalidated).
  function automatic cstate_t sl2_serve_next(cstate_t cur, buscmd_t c);
    if (c == BUS_GETX) return ST_I;
    if (cur == ST_M2)  return ST_I;
    return cur;
  endfunction

endpackage
