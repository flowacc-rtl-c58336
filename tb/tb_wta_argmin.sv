// tb_wta_argmin: random cost vectors (with many ties) against a reference
// minimum search in which the lowest index wins a tie.
module tb_wta_argmin;
  localparam int N = 25, CW = 7;
  logic [CW-1:0] cost [N];
  logic [4:0]    idx;
  logic [CW-1:0] min_cost;
  int checks = 0, failures = 0;
  wta_argmin #(.N(N), .CW(CW), .IW(5)) dut (.cost, .idx, .min_cost);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ei, ev;
      for (int i = 0; i < N; i++) cost[i] = (n % 2) ? CW'($urandom % 8) : CW'($urandom % 65);
      #1;
      ei = 0; ev = int'(cost[0]);
      for (int i = 1; i < N; i++) if (int'(cost[i]) < ev) begin ev = int'(cost[i]); ei = i; end
      checks++;
      if (int'(idx) != ei || int'(min_cost) != ev) begin
        failures++;
        $display("FAIL n=%0d idx=%0d/%0d min=%0d/%0d", n, idx, ei, min_cost, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
