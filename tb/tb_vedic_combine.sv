// tb_vedic_combine -- checks one combining level on its own.
// Four partial products of random 4-bit and 32-bit operand halves are
// formed in this testbench with '*', and the combined result must equal the
// full product of the joined operands. Halves of all ones make the
// crosswise sum carry.
module tb_vedic_combine;
  int checks = 0, failures = 0;

  logic [7:0]   q0s, q1s, q2s, q3s;  logic [15:0]  ps;
  logic [63:0]  q0l, q1l, q2l, q3l;  logic [127:0] pl;

  vedic_combine #(.S(4)) dut4  (.q0(q0s), .q1(q1s), .q2(q2s), .q3(q3s), .p(ps));
  vedic_combine          dut32 (.q0(q0l), .q1(q1l), .q2(q2l), .q3(q3l), .p(pl));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  ah, al, bh, bl;
    logic [31:0] xh, xl, yh, yl;
    for (int k = 0; k < 2000; k++) begin
      {ah, al, bh, bl} = (k == 0) ? '1 : 16'($urandom);
      q0s = al * bl; q1s = ah * bl; q2s = al * bh; q3s = ah * bh;
      {xh, xl, yh, yl} = (k == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      q0l = 64'(xl) * 64'(yl); q1l = 64'(xh) * 64'(yl);
      q2l = 64'(xl) * 64'(yh); q3l = 64'(xh) * 64'(yh);
      #1;
      checks++;
      if (ps != 16'({ah, al}) * 16'({bh, bl})) begin
        failures++;
        $display("FAIL S=4: %h x %h = %h", {ah, al}, {bh, bl}, ps);
      end
      checks++;
      if (pl != 128'({xh, xl}) * 128'({yh, yl})) begin
        failures++;
        $display("FAIL S=32: %h x %h = %h", {xh, xl}, {yh, yl}, pl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
