// Two-threshold line detector for one-wire calibration (behavioural model,
// not synthesizable).
//
// With a series-terminated driver and a high-impedance far end, a rising
// edge first lifts the wire end of the termination resistor to half the
// swing; when the wave reflected at the far end comes back, one round trip
// later, the voltage doubles to the full swing. Two comparators with
// different trip points tell the two steps apart: 'incident' rises above
// TRIP_LO (the outgoing step), 'reflected' above TRIP_HI (the returned step).
// 'reflected' then stands in for the signal that the second wire would
// return in the two-wire scheme. 'v_line' is the voltage at the wire end of
// the termination resistor as a fraction of the driver's swing. Two trip
// points and the doubling follow the published scheme; the trip points at one quarter and
// three quarters of the swing are this design's choice. The comparators are
// ideal: no delay, no noise, no hysteresis.
`timescale 1ps/1ps
module reflection_detector #(
  parameter real TRIP_LO = 0.25,
  parameter real TRIP_HI = 0.75
) (
  input  real  v_line,
  output logic incident,
  output logic reflected
);
  assign incident  = (v_line > TRIP_LO);
  assign reflected = (v_line > TRIP_HI);
endmodule
