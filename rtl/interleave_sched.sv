// interleave_sched: input-slot generator for pipeline interleaving.
//
// A processing element with a loop of T_LOOP cycles, fed at most once every
// K cycles, can work on N = T_LOOP / K independent operations at the same
// time. This block produces that input order: step 0 of operation 0, step 0
// of operation 1, ... step 0 of operation OPS-1, then (after the stall
// cycles) step 1 of operation 0, and so on for STEPS steps. Slots are K
// cycles apart; after every set of N slots, R = T_LOOP % K stall cycles are
// inserted, so that every set starts exactly T_LOOP cycles after the previous
// one and each operand meets the partial result of the same operation coming
// back around the loop. With OPS < N the unused slots stay empty.
//
// Interface: pulse `start` for one cycle while idle; the first slot is
// issued on the next cycle. `issue` marks a slot, with `op` and `step`
// naming it and `tag` giving the control bits that travel with it (acc = 0
// on step 0, so the PE adds to zero; last = 1 on the final step). `stall`
// is high during the R stall cycles, `busy` during the whole run, and `done`
// pulses on the last cycle of the run.
//
// Timing: the run lasts STEPS * T_LOOP cycles; slot (op, step) is issued
// step*T_LOOP + op*K cycles after the first slot. The schedule itself is the
// document's rule; the counter structure is this design's own.
module interleave_sched
  import sa_pkg::*;
#(
  parameter int unsigned T_LOOP = 13,
  parameter int unsigned K      = 3,
  parameter int unsigned OPS    = T_LOOP / K,
  parameter int unsigned STEPS  = 4,
  localparam int unsigned N     = T_LOOP / K,
  localparam int unsigned OP_W  = (OPS > 1) ? $clog2(OPS) : 1,
  localparam int unsigned ST_W  = (STEPS > 1) ? $clog2(STEPS) : 1,
  localparam int unsigned PH_W  = (T_LOOP > 1) ? $clog2(T_LOOP) : 1,
  localparam int unsigned K_W   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SL_W  = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            issue,
  output logic [OP_W-1:0] op,
  output logic [ST_W-1:0] step,
  output op_tag_t         tag,
  output logic            stall,
  output logic            busy,
  output logic            done
);

  logic            running;
  logic [PH_W-1:0] phase;   // cycle within the current set, 0 .. T_LOOP-1
  logic [K_W-1:0]  kcnt;    // cycle within the current slot, 0 .. K-1
  logic [SL_W-1:0] slot;    // slot within the set; N during the stalls
  logic [ST_W-1:0] step_q;

  wire last_phase = (phase == PH_W'(T_LOOP - 1));
  wire last_step  = (step_q == ST_W'(STEPS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      phase   <= '0;
      kcnt    <= '0;
      slot    <= '0;
      step_q  <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        phase   <= '0;
        kcnt    <= '0;
        slot    <= '0;
        step_q  <= '0;
      end
    end else if (last_phase) begin
      phase  <= '0;
      kcnt   <= '0;
      slot   <= '0;
      step_q <= step_q + 1'b1;
      if (last_step) running <= 1'b0;
    end else begin
      phase <= phase + 1'b1;
      if (kcnt == K_W'(K - 1)) begin
        kcnt <= '0;
        slot <= slot + 1'b1;
      end else begin
        kcnt <= kcnt + 1'b1;
      end
    end
  end

  assign issue     = running && (kcnt == '0) && (slot < SL_W'(N)) && (slot < SL_W'(OPS));
  assign op        = OP_W'(slot);
  assign step      = step_q;
  assign tag.valid = issue;
  assign tag.acc   = issue && (step_q != '0);
  assign tag.last  = issue && last_step;
  assign stall     = running && (slot >= SL_W'(N));
  assign busy      = running;
  assign done      = running && last_phase && last_step;

  // Elaboration-time parameter checks.
  if (K < 1 || T_LOOP < K) begin : g_bad_k
    $error("interleave_sched: need 1 <= K <= T_LOOP");
  end
  if (OPS < 1 || OPS > N) begin : g_bad_ops
    $error("interleave_sched: OPS must be 1 .. T_LOOP/K");
  end

endmodule
