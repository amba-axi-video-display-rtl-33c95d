// tb_ycbcr2rgb: compares the fixed-point converter with a floating-point
// evaluation of the same equations over corner values and random inputs;
// the results must agree within 1 LSB.
//
// The equations follow the document; the 1 LSB tolerance is this
// testbench's choice.
module tb_ycbcr2rgb;
  import vdc_tb_pkg::*;
  logic [7:0] y, cb, cr, r, g, b;
  int checks = 0, failures = 0;

  ycbcr2rgb dut (.y, .cb, .cr, .r, .g, .b);

  task automatic try(input int yy, input int uu, input int vv);
    int er, eg, eb;
    y = 8'(yy); cb = 8'(uu); cr = 8'(vv);
    #1;
    ref_rgb(yy, uu, vv, er, eg, eb);
    checks++;
    if (absdiff(er, int'(r)) > 1 || absdiff(eg, int'(g)) > 1 || absdiff(eb, int'(b)) > 1) begin
      failures++;
      if (failures < 10)
        $display("Y=%0d Cb=%0d Cr=%0d got %0d,%0d,%0d want %0d,%0d,%0d", yy, uu, vv, r, g, b, er, eg, eb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a += 51)
      for (int u = 0; u < 256; u += 51)
        for (int v = 0; v < 256; v += 51)
          try(a, u, v);
    for (int i = 0; i < 5000; i++) try($urandom % 256, $urandom % 256, $urandom % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
