// white_cell: polarity-restoring cell of the carry generator.
//
// In a static-CMOS prefix network every gate inverts, so each layer flips the
// polarity of the (g,p) pair. A white cell sits in every column that has
// nothing to combine in a layer and simply inverts both signals, keeping the
// column in step with its neighbours: gout = ~gl, pout = ~pl. Combinational.
module white_cell (
  input  logic gl,
  input  logic pl,
  output logic gout,
  output logic pout
);
  assign gout = ~gl;
  assign pout = ~pl;
endmodule
