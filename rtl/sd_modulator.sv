// sd_modulator: behavioural model of the per-column first-order incremental
// sigma-delta modulator with algorithmic (coarse + fine) conversion.
//
// This is a behavioural model of an analog circuit (switched-capacitor
// integrator and comparator), written as an ideal discrete-time integrator
// on microvolt integers. Inputs are measured from the low reference; the
// feedback DAC subtracts the full scale FS.
//
// Operation, one clock per modulator cycle:
//   adr        integrator reset (w = 0), done before the coarse and the fine part
//   adck & !adf  coarse cycle: w += ADI; if w >= FS then D_M = 1 and w -= FS
//   ads        residue w is stored on the hold capacitor Ch
//   adck & adf   fine cycle: the same step with Ch as input
// After N coarse cycles the count of ones is floor(sum(ADI) / FS) and the
// residue is sum(ADI) - count * FS, in [0, FS). Converting the residue for 32
// fine cycles yields 5 more bits, so 32 * coarse + fine = floor(32 * sum / FS):
// with 128 coarse cycles a 12-bit code of the average input. Because only the
// sum matters, a sequence of different inputs is averaged and quantised at
// once, which is what compressed sensing uses.
// dm is combinational: it is the comparator decision of the current cycle and
// is counted by the decimation filter on the same clock edge.
//
// The coarse/feedback/fine structure, 128 and 32 cycles and the control names
// ADR, ADCK, ADF, ADS follow the described ADC; the separate ADD/ADH switch
// phases are folded into ads, and the residue gain Ci/Cs is taken as ideal.
module sd_modulator
  import cs_pkg::*;
#(
  parameter int unsigned FS = FS_UV
) (
  input  logic  clk,
  input  volt_t adi,
  input  logic  adr,
  input  logic  adck,
  input  logic  adf,
  input  logic  ads,
  output logic  dm
);

  logic [VW:0] w_q;     // integrator, kept in [0, FS)
  volt_t       ch_q;    // hold capacitor
  volt_t       x;
  logic [VW:0] sum;

  always_comb begin
    x   = adf ? ch_q : adi;
    if (x >= volt_t'(FS)) x = volt_t'(FS - 1);   // input range limit
    sum = w_q + {1'b0, x};
    dm  = adck && (sum >= (VW+1)'(FS));
  end

  always_ff @(posedge clk)
    if (adr)       w_q <= '0;
    else if (ads)  ch_q <= w_q[VW-1:0];
    else if (adck) w_q <= dm ? sum - (VW+1)'(FS) : sum;

endmodule
