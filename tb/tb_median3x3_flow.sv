// tb_median3x3_flow: random flow neighbourhoods; the output must be the fifth
// smallest x and the fifth smallest y, found here by counting.
module tb_median3x3_flow;
  import flowacc_pkg::*;
  flow_t win [N_SR];
  flow_t med;
  int checks = 0, failures = 0;
  median3x3_flow dut (.win, .med);

  // fifth smallest of nine, found by counting smaller and equal values
  function automatic int med9(input int v [9]);
    for (int i = 0; i < 9; i++) begin
      int lt, le;
      lt = 0; le = 0;
      for (int j = 0; j < 9; j++) begin
        if (v[j] < v[i]) lt++;
        if (v[j] <= v[i]) le++;
      end
      if (lt <= 4 && le > 4) return v[i];
    end
    return 0;
  endfunction
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int xs [9], ys [9];
      int gx, gy, ex, ey;
      for (int i = 0; i < 9; i++) begin
        int vx, vy;
        vx = int'($urandom % ((n % 2) ? 7 : 200)) - ((n % 2) ? 3 : 100);
        vy = int'($urandom % ((n % 2) ? 7 : 200)) - ((n % 2) ? 3 : 100);
        win[i] = {FLOW_W'(vy), FLOW_W'(vx)};
        xs[i] = vx; ys[i] = vy;
      end
      #1;
      ex = med9(xs); ey = med9(ys);
      gx = flow_x(med); gy = flow_y(med);
      checks++;
      if (gx != ex || gy != ey) begin
        failures++;
        $display("FAIL n=%0d got (%0d,%0d) exp (%0d,%0d)", n, gx, gy, ex, ey);
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
