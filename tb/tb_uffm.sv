// tb_uffm: checks the universal Montgomery multiplier against a plain
// shift-and-add reference, A*B*x^-m mod p(x), for several fields of degree
// 2..8 (all pairs for the small fields, random pairs for the larger ones).
`timescale 1ns/1ps
module tb_uffm;
  import tb_gf_pkg::*;

  logic [7:0] a, b, s;
  logic [8:0] p;
  logic [3:0] m;
  int checks = 0, failures = 0;

  uffm #(.D(8)) dut (.a(a), .b(b), .p(p), .m(m), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int pp, int mm, int aa, int bb);
    int exp;
    p = 9'(pp); m = 4'(mm); a = 8'(aa); b = 8'(bb);
    #1;
    exp = mont(aa, bb, pp, mm);
    checks++;
    if (int'(s) != exp) begin
      failures++;
      if (failures < 10) $display("m=%0d p=%h: %h*%h gave %h, expected %h", mm, pp, aa, bb, s, exp);
    end
  endtask

  int fields_p [6] = '{'h7, 'h13, 'h43, 'h89, 'h11d, 'h12d};
  int fields_m [6] = '{2, 4, 6, 7, 8, 8};

  initial begin
    for (int f = 0; f < 6; f++) begin
      automatic int q = 1 << fields_m[f];
      if (q <= 64) begin
        for (int x = 0; x < q; x++)
          for (int y = 0; y < q; y++) try(fields_p[f], fields_m[f], x, y);
      end else begin
        for (int k = 0; k < 3000; k++)
          try(fields_p[f], fields_m[f], $urandom_range(q - 1), $urandom_range(q - 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
