// tb_driver_cell: exhaustive check that the cell inverts both g and p.
module tb_driver_cell;
  logic gl, pl, gout, pout;
  int checks = 0, failures = 0;

  driver_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {gl, pl} = 2'(v);
      #1;
      checks++;
      if (gout !== !gl || pout !== !pl) begin
        failures++;
        $display("mismatch gl=%b pl=%b -> %b %b", gl, pl, gout, pout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
