// tb_penalty_factor: random 3x3 support regions; each candidate's penalty must
// equal the sum of L1 distances to the other eight flows, computed here.
module tb_penalty_factor;
  import flowacc_pkg::*;
  flow_t            sr    [N_SR];
  logic [PEN_W-1:0] theta [N_SR];
  int checks = 0, failures = 0;
  penalty_factor dut (.sr, .theta);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int vx [9], vy [9];
      for (int i = 0; i < 9; i++) begin
        int m;
        m = (n % 2) ? 5 : 61;
        vx[i] = int'($urandom % m) - m / 2;
        vy[i] = int'($urandom % m) - m / 2;
        sr[i].x = FLOW_W'(vx[i]);
        sr[i].y = FLOW_W'(vy[i]);
      end
      #1;
      for (int i = 0; i < 9; i++) begin
        int e;
        e = 0;
        for (int j = 0; j < 9; j++) begin
          e += (vx[i] > vx[j]) ? vx[i] - vx[j] : vx[j] - vx[i];
          e += (vy[i] > vy[j]) ? vy[i] - vy[j] : vy[j] - vy[i];
        end
        checks++;
        if (int'(theta[i]) != e) begin
          failures++;
          $display("FAIL n=%0d i=%0d got %0d exp %0d", n, i, theta[i], e);
        end
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
