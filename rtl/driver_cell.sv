// driver_cell: one stage of a ratioed inverting driver.
//
// Used where a (g,p) pair must drive a long wire or many cells. Logically an
// inverter on each signal (gout = ~gl, pout = ~pl), like a white cell; in
// silicon its transistors are scaled up by the stage ratio, which changes only
// delay and is not represented here. Combinational.
module driver_cell (
  input  logic gl,
  input  logic pl,
  output logic gout,
  output logic pout
);
  assign gout = ~gl;
  assign pout = ~pl;
endmodule
