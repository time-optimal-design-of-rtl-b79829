// tb_multistage_driver: drivers of 0 to 4 stages (3 is the default, used by
// the 32-bit adder). Each output must be the input inverted once per stage,
// and tap k of each driver the input inverted k times.
module tb_multistage_driver;
  logic       gi, pi_;
  logic [4:0] go, po;
  logic [0:0] gt0, pt0;
  logic [1:0] gt1, pt1;
  logic [2:0] gt2, pt2;
  logic [3:0] gt3, pt3;
  logic [4:0] gt4, pt4;
  logic [4:0] gtx [5];
  logic [4:0] ptx [5];
  int checks = 0, failures = 0;

  assign gtx = '{5'(gt0), 5'(gt1), 5'(gt2), 5'(gt3), gt4};
  assign ptx = '{5'(pt0), 5'(pt1), 5'(pt2), 5'(pt3), pt4};

  multistage_driver #(.STAGES(0)) u_s0 (.gi, .pi_, .go(go[0]), .po(po[0]), .g_taps(gt0), .p_taps(pt0));
  multistage_driver #(.STAGES(1)) u_s1 (.gi, .pi_, .go(go[1]), .po(po[1]), .g_taps(gt1), .p_taps(pt1));
  multistage_driver #(.STAGES(2)) u_s2 (.gi, .pi_, .go(go[2]), .po(po[2]), .g_taps(gt2), .p_taps(pt2));
  multistage_driver               u_s3 (.gi, .pi_, .go(go[3]), .po(po[3]), .g_taps(gt3), .p_taps(pt3));
  multistage_driver #(.STAGES(4)) u_s4 (.gi, .pi_, .go(go[4]), .po(po[4]), .g_taps(gt4), .p_taps(pt4));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {gi, pi_} = 2'(v);
      #1;
      for (int s = 0; s < 5; s++) begin
        checks++;
        if (go[s] !== (gi ^ s[0]) || po[s] !== (pi_ ^ s[0])) begin
          failures++;
          $display("mismatch stages=%0d gi=%b pi=%b -> %b %b", s, gi, pi_, go[s], po[s]);
        end
        for (int k = 0; k <= s; k++) begin
          checks++;
          if (gtx[s][k] !== (gi ^ k[0]) || ptx[s][k] !== (pi_ ^ k[0])) begin
            failures++;
            $display("tap mismatch stages=%0d tap %0d", s, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
