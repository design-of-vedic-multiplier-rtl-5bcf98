// tb_ref_mult -- checks the reference multiplier against a shift-and-add model.
module tb_ref_mult;
  int checks = 0, failures = 0;
  logic [63:0] a, b;
  logic [127:0] p;

  ref_mult dut (.a(a), .b(b), .p(p));

  function automatic logic [127:0] shift_add(logic [63:0] x, logic [63:0] y);
    logic [127:0] acc = '0;
    for (int i = 0; i < 64; i++)
      if (y[i]) acc = acc + (128'(x) << i);
    return acc;
  endfunction

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      a = (k == 0) ? '1 : {$urandom, $urandom};
      b = (k == 0) ? '1 : {$urandom, $urandom};
      #1;
      checks++;
      if (p != shift_add(a, b)) begin
        failures++;
        $display("FAIL %h x %h = %h", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
