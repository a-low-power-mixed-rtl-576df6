// pwm_latch: RS latch of the peak current-mode modulator, with leading-edge
// blanking and a 50 % duty-cycle limit.
//
// The latch output gate turns the high-side switch on. It is set on the
// master-clock edge that starts a switching period (set_en high in the
// cycle before) and is cleared asynchronously, at any instant, when
//   - the current comparator fires (comp) outside the blanking window, so the
//     switch turns off when the sensed current reaches the command, or
//   - the duty-limit window (dlimit, second half of the period) is reached,
//     which caps the duty cycle at 50 % since no slope compensation is used.
// During blank the comparator is ignored, so the current spike at switch
// turn-on cannot end the pulse early. The set/reset behaviour, the blanking
// and the 50 % limit follow the design this is based on; building the latch
// as a flip-flop with an asynchronous clear and decoding the windows from
// the period counter of timing_gen are this design's choices.
// The asynchronous clear is derived from comp on purpose: the peak-current
// turn-off must not wait for a clock edge. blank and dlimit are decoded from
// registers and do not glitch. An assertion checks that the gate is never
// high during the duty-limit window.
module pwm_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic set_en,
  input  logic blank,
  input  logic dlimit,
  input  logic comp,
  output logic gate
);
  logic clr;

  assign clr = !rst_n || dlimit || (comp && !blank);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)
      gate <= 1'b0;
    else if (set_en)
      gate <= 1'b1;
  end

  // The switch is never on in the second half of the period.
  a_duty_limit : assert property (@(posedge clk) disable iff (!rst_n) dlimit |-> !gate)
    else $error("pwm_latch: gate high inside the duty-limit window");
endmodule
