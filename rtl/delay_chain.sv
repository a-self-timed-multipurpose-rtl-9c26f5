// Behavioural model of the sensing delay chain.
//
// In the FPGA each stage is a LUT followed by a transparent latch, placed
// and routed by constraints; what matters is the propagation delay of the
// chain, which tracks process corner, temperature and ageing. That delay is
// a property of the silicon, not of the logic, so this model is for
// simulation: each stage passes its input on after STAGE_DELAY_PS
// picoseconds, and the chain delay is STAGES * STAGE_DELAY_PS. Synthesis
// keeps only the logic function (a wire); on a device the stages must be
// instantiated as kept LUT/latch primitives.
//
// Following the published first-order delay model, t_tot(T) = t_tot0 *
// (1 + k1 * (T - T0)), a temperature or process change is modelled by
// choosing STAGE_DELAY_PS. The stage count and the 1.1 ns stage delay (from
// the published 180,000 ns measurement of an 80-stage, 1024-loop sensor)
// are the defaults; the latch gate is modelled as permanently open.
`timescale 1ps / 1ps
module delay_chain
  import delay_sensor_pkg::*;
#(
  parameter int unsigned STAGES         = CHAIN_STAGES_DEFAULT,   // LUT + latch stages
  parameter int unsigned STAGE_DELAY_PS = STAGE_DELAY_PS_DEFAULT  // delay of one stage
) (
  input  logic chain_in,   // pulse generator output
  output logic chain_out   // delayed copy
);

  logic [STAGES:0] node;

  assign node[0] = chain_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    assign #(STAGE_DELAY_PS) node[i+1] = node[i];
  end

  assign chain_out = node[STAGES];

endmodule
