// sense_amp: BEHAVIOURAL MODEL of one column's two-stage current sense
// amplifier, an analog circuit in the real chip.
//
// Stage S0 is a transimpedance amplifier: it turns the column current into a
// voltage through its feedback resistor R (R_OHM, "greater than 5000 ohm"),
// v0 = I * R. Stage S1 is a comparator against the threshold voltage vth,
// set externally by calibration; edge = 1 when v0 >= vth, i.e. when the
// cell's Laplacian current reaches the threshold current vth / R. Units:
// current in pA, voltages in pV (pA x ohm). The sign convention of S0 is
// chosen so that the comparison is I_out >= I_th, the edge condition the
// design states. Settling (about 1 us on a 1 pF column line) is not
// modelled here; the readout controller waits for it. With R = 5000 ohm
// (a multiple of 8) the three lowest bits of v0_pv are always zero.
module sense_amp #(
  parameter int I_W   = 24,
  parameter int R_OHM = 5000
) (
  input  logic signed [I_W-1:0] i_pa,
  input  logic signed [47:0]    vth_pv,
  output logic signed [47:0]    v0_pv,
  output logic                  edge_o
);
  assign v0_pv  = 48'(i_pa) * 48'(R_OHM);
  assign edge_o = (v0_pv >= vth_pv);
endmodule
