// current_comparator: behavioural model (not synthesizable) of the analog
// comparator of the peak current-mode loop.
//
// comp is high while the sensed switch current v_s(t) = Ks*Rs*i_s(t) is
// above the DAC output v_c(t). It is continuous-time: the output follows its
// real inputs whenever they change, so the peak-current reset of the latch
// is not tied to the master clock. The comparison follows the design this
// is based on; an ideal comparator (no offset, delay or hysteresis) is this
// model's choice.
module current_comparator (
  input  real  v_s,
  input  real  v_c,
  output logic comp
);
  assign comp = (v_s > v_c);
endmodule
