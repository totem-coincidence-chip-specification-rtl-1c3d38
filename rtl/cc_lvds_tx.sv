// cc_lvds_tx: behavioural model of an LVDS output driver with power down.
// Not synthesizable logic: the real part is an analog cell.
//
// When enabled the driver puts d on the plus line and its complement on
// the minus line. When disabled (an output grouped away by OR 2, or an
// unused driver) it is powered down and both lines are low, standing for
// a driver that sources no current.
module cc_lvds_tx (
  input  logic d,
  input  logic en,
  output logic out_p,
  output logic out_n
);

  assign out_p = en & d;
  assign out_n = en & ~d;

endmodule
