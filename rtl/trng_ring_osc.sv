// trng_ring_osc: behavioural model of one entropy-source ring oscillator.
//
// This is a behavioural model, not synthesizable logic: the real part is an
// analog ring of resistive-load gates whose period and jitter come from
// device physics. The ring is one NAND gate followed by N_STAGES-1 inverters
// (eleven inverting stages in all), closed back onto the second NAND input.
// While en is low the NAND output is held high and every stage rests at its
// static level. When en rises, a single edge runs around the ring, one stage
// at a time, so the period is 2*N_STAGES stage delays.
//
// Each stage delay is a constant part plus a random part. The random part is
// the sum of JIT_FLIPS fair coin flips times a step of Q_PS picoseconds, so
// its standard deviation makes the period jitter (2*N_STAGES independent
// stage delays) equal JITTER_PS. The mean period is PERIOD_PS, to within the
// rounding of the stage delay to whole picoseconds.
//
// Ports: en (the NAND's enable input), dly (the output of inverting stage
// DLY_TAP, used by the activation chain to start the next oscillator), out
// (the last stage through the output buffer). The buffer and the stage
// capacitors are folded into the stage delay; the buffer itself adds none.
// Stage count, tap position, frequency and jitter follow the design; the
// jitter distribution, the buffer timing and the model's reaction to en
// falling (the ring returns to rest after the stage in flight completes)
// are this model's own choices.
module trng_ring_osc
  import trng_pkg::*;
#(
  parameter int unsigned N_STAGES  = OSC_STAGES,
  parameter int unsigned TAP       = DLY_TAP,
  parameter int unsigned PERIOD_PS = OSC_PERIOD_PS,
  parameter int unsigned JITTER_PS = OSC_JITTER_PS,
  parameter int unsigned MISMATCH_PS = OSC_MISMATCH_PS
) (
  input  logic en,
  output logic dly,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STAGE_PS = PERIOD_PS / (2 * N_STAGES);
  // Stage sigma = JITTER_PS / sqrt(2*N_STAGES); binomial sigma = sqrt(JIT_FLIPS)/2 steps.
  localparam real         SIG_STAGE_PS = real'(JITTER_PS) / $sqrt(2.0 * real'(N_STAGES));
  localparam int unsigned Q_RAW  = int'(SIG_STAGE_PS * 2.0 / $sqrt(real'(JIT_FLIPS)) + 0.5);
  localparam int unsigned Q_PS   = (Q_RAW == 0) ? 1 : Q_RAW;
  localparam int unsigned JIT_ON = (JITTER_PS != 0) ? 1 : 0;
  // Instance mismatch: a per-stage offset fixed at time zero, sum of
  // JIT_FLIPS coin flips times MQ_PS, so its sigma across instances is MISMATCH_PS.
  localparam int unsigned MQ_RAW = int'(real'(MISMATCH_PS) * 2.0 / $sqrt(real'(JIT_FLIPS)) + 0.5);
  localparam int unsigned MQ_PS  = (MQ_RAW == 0) ? 1 : MQ_RAW;
  localparam int unsigned MIS_ON = (MISMATCH_PS != 0) ? 1 : 0;
  localparam int unsigned BASE_PS = STAGE_PS - JIT_ON * Q_PS * (JIT_FLIPS / 2)
                                             - MIS_ON * MQ_PS * (JIT_FLIPS / 2);
  localparam logic [31:0] FLIP_MASK = 32'((64'd1 << JIT_FLIPS) - 1);

  // Resting levels with the NAND output high: stage k sits at 1 for even k.
  function automatic logic [N_STAGES-1:0] rest_levels();
    logic [N_STAGES-1:0] r;
    for (int k = 0; k < int'(N_STAGES); k++) r[k] = (k % 2 == 0);
    return r;
  endfunction

  logic [N_STAGES-1:0] node;

  int unsigned mis_steps;

  initial begin
    node      = rest_levels();
    mis_steps = MIS_ON * $countones($urandom() & FLIP_MASK);
  end

  always begin : ring
    int unsigned stage;
    int unsigned steps;
    wait (en);
    stage = 0;
    while (en) begin
      steps = JIT_ON * $countones($urandom() & FLIP_MASK);
      #(BASE_PS * 1ps);
      repeat (steps) #(Q_PS * 1ps);
      repeat (mis_steps) #(MQ_PS * 1ps);
      if (!en) break;
      if (stage == 0) node[0] = ~(en & node[N_STAGES-1]);
      else            node[stage] = ~node[stage-1];
      stage = (stage == N_STAGES - 1) ? 0 : stage + 1;
    end
    node = rest_levels();
  end

  assign dly = node[TAP-1];
  assign out = node[N_STAGES-1];

  initial begin
    assert (N_STAGES % 2 == 1 && N_STAGES >= 3) else $error("ring needs an odd stage count of at least 3");
    assert (TAP >= 1 && TAP <= N_STAGES) else $error("delay tap outside the ring");
    assert (STAGE_PS > (Q_PS + MQ_PS) * (JIT_FLIPS / 2)) else $error("jitter too large for the stage delay");
  end
endmodule
