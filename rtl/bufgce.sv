// bufgce: behavioural model of a gated global clock buffer with clock enable.
//
// This is a behavioural stand-in for the FPGA vendor's global clock buffer
// with enable (BUFGCE), which the clock enabler drives; the real part is a
// hard clock-tree primitive. The model is the usual glitch-free gate: a
// latch that is transparent while I is low captures CE, and the output is I
// AND the latched enable. A change of CE while I is high therefore has no
// effect until I has fallen, so O never carries a shortened (runt) pulse, and
// a stopped clock rests low.
//
// Interface: I is the clock in, CE the enable, O the gated clock. CE must be
// stable around the falling edge of I; the clock enabler launches it from a
// flip-flop on the rising edge, which gives half a period of margin. The
// latch is intended: it is what makes the gate glitch-free.
module bufgce (
  input  logic I,
  input  logic CE,
  output logic O
);

  logic ce_latched;

  always_latch begin
    if (!I) ce_latched = CE;
  end

  assign O = I & ce_latched;

endmodule
