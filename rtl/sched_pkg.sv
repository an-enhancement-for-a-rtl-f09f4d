// sched_pkg: types and constants shared by the two-cycle scheduler.
//
// The scheduling loop (wakeup then select) takes SCHED_LOOP_LAT = 2 cycles.
// An instruction is "short" when its execution latency is below that loop
// latency; only such producers are tracked early through wakeup matrix B.
// Latencies are those of the integer side of the modelled 4-way machine:
// ALU 1, load 3 (L1 hit), multiply 10 (not pipelined), everything else 1.
// Stores are split into an address part (STA) and a data part (STD), each
// taking its own issue-queue entry. The operation encoding is this design's
// own choice.
package sched_pkg;

  localparam int unsigned SCHED_LOOP_LAT = 2;
  localparam int unsigned LAT_ALU  = 1;
  localparam int unsigned LAT_LOAD = 3;
  localparam int unsigned LAT_MUL  = 10;
  localparam int unsigned LAT_W    = 4;   // width of latency / delay counters

  typedef enum logic [2:0] {
    OP_ALU  = 3'd0,
    OP_LOAD = 3'd1,
    OP_STA  = 3'd2,
    OP_STD  = 3'd3,
    OP_MUL  = 3'd4
  } op_e;

  function automatic logic [LAT_W-1:0] op_latency(op_e op);
    case (op)
      OP_LOAD: return LAT_W'(LAT_LOAD);
      OP_MUL:  return LAT_W'(LAT_MUL);
      default: return LAT_W'(LAT_ALU);
    endcase
  endfunction

  // Decode-stage classification: latency shorter than the scheduling loop.
  function automatic logic is_short(op_e op);
    return op_latency(op) < LAT_W'(SCHED_LOOP_LAT);
  endfunction

  // Needs one of the memory access ports.
  function automatic logic uses_mem(op_e op);
    return (op == OP_LOAD) || (op == OP_STA);
  endfunction

  // Cycles from selection to the activation of the matrix-A wakeup line:
  // one cycle for single-cycle producers (the register after the select
  // logic), latency-1 for longer ones so that the consumer is selected
  // exactly `latency` cycles after its producer.
  function automatic logic [LAT_W-1:0] wake_delay(op_e op);
    logic [LAT_W-1:0] l;
    l = op_latency(op);
    return (l > LAT_W'(1)) ? l - LAT_W'(1) : LAT_W'(1);
  endfunction

endpackage
