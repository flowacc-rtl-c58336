// tb_hamming64: the Hamming distance of random and corner-case 64-bit
// descriptor pairs is compared with a bit-by-bit count done in the testbench.
module tb_hamming64;
  logic [63:0] fa, fb;
  logic [6:0]  hd;
  int checks = 0, failures = 0;
  hamming64 dut (.fa, .fb, .hd);

  function automatic int ref_hd(input logic [63:0] a, input logic [63:0] b);
    int n = 0;
    for (int k = 0; k < 64; k++) if (a[k] != b[k]) n++;
    return n;
  endfunction

  task automatic check(input logic [63:0] a, input logic [63:0] b);
    fa = a; fb = b; #1;
    checks++;
    if (int'(hd) != ref_hd(a, b)) begin
      failures++;
      $display("FAIL %h %h got %0d exp %0d", a, b, hd, ref_hd(a, b));
    end
  endtask

  initial begin
    check('0, '0);
    check('0, '1);
    check(64'h8000_0000_0000_0000, 64'h0);
    check(64'h0, 64'h0000_0000_0000_0001);
    check(64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555);
    for (int k = 0; k < 64; k++) check(64'h1 << k, 64'h0);
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] a, b;
      a = {$urandom, $urandom};
      b = (n % 3 == 0) ? a ^ (64'h1 << ($urandom % 64)) : {$urandom, $urandom};
      check(a, b);
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
