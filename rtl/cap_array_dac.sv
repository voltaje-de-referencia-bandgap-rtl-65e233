// Behavioural model (not synthesizable logic) of the differential capacitive
// split-array DAC of the 10-bit SAR ADC.
//
// Each side (positive and negative) has two binary-weighted arrays of five
// capacitors: the MSB array holds bits 5..9 (1, 2, 4, 8, 16 Cu) and the LSB
// array bits 0..4 (1, 2, 4, 8, 16 Cu) plus one dummy Cu that sets the divider.
// A bridge capacitor CB joins the LSB array's top node to the MSB array's top
// node, which is the comparator input. With CB = (sum of LSB-array
// capacitance) / (sum of MSB-array capacitance) * Cu = 32/31 Cu the weight of
// bit i at the comparator node is exactly 2^i / 1024.
//
// The top plates sample the input through the bootstrap switches with every
// bottom plate at Vcm; vsp / vsn are those sampled (held) voltages. Moving a
// bottom plate from Vcm to VDD or GND shifts the top nodes by charge
// redistribution. The model solves the two-node (MSB node, LSB node) charge
// equations for the bottom-plate steps, so a CB other than the ideal value
// shows the split array's nonlinearity:
//   (CM + CB) dX - CB dY = sum_MSB C_i dV_i
//   -CB dX + (CL + CB) dY = sum_LSB C_j dV_j
// vpos = vsp + dX(positive side), vneg = vsn + dX(negative side).
// Top-plate parasitics are not modelled. The split into five MSB and five LSB
// capacitors, the dummy capacitor and the bridge formula are specified;
// the three-position switches with Vcm from the bandgap are this design's
// reading of the two-bit switch controls.
module cap_array_dac #(
  parameter int unsigned N_BITS = sar_adc_pkg::N_BITS,
  parameter real         VDD    = 1.8,
  parameter real         CB     = 32.0 / 31.0   // bridge capacitor, in Cu
) (
  input  real                              vsp,
  input  real                              vsn,
  input  real                              vcm,
  input  sar_adc_pkg::sw_sel_t [N_BITS-1:0] con_p,
  input  sar_adc_pkg::sw_sel_t [N_BITS-1:0] con_n,
  output real                              vpos,
  output real                              vneg
);

  localparam int unsigned N_LSB = N_BITS / 2;   // bits 0..N_LSB-1 in the LSB array

  // Bottom-plate step from the sampling position Vcm.
  function automatic real plate_step(sar_adc_pkg::sw_sel_t s, real vc);
    case (s)
      sar_adc_pkg::SW_VDD: return VDD - vc;
      sar_adc_pkg::SW_GND: return -vc;
      default:             return 0.0;
    endcase
  endfunction

  // Shift of the comparator-side top node for one array's switch settings.
  function automatic real top_shift(sar_adc_pkg::sw_sel_t [N_BITS-1:0] con, real vc);
    real qm, ql, cm, cl, det;
    qm = 0.0; ql = 0.0;
    cm = 0.0; cl = 1.0;                        // cl starts with the dummy Cu
    for (int i = 0; i < N_BITS; i++) begin
      if (i < N_LSB) begin
        cl += real'(1 << i);
        ql += real'(1 << i) * plate_step(con[i], vc);
      end else begin
        cm += real'(1 << (i - N_LSB));
        qm += real'(1 << (i - N_LSB)) * plate_step(con[i], vc);
      end
    end
    det = (cm + CB) * (cl + CB) - CB * CB;
    return (qm * (cl + CB) + CB * ql) / det;
  endfunction

  always_comb begin
    vpos = vsp + top_shift(con_p, vcm);
    vneg = vsn + top_shift(con_n, vcm);
  end

endmodule
