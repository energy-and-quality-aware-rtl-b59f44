// tb_ha2_chain: exhaustive check of the 6-bit merged half-adder chain:
// {cout, sum} must equal x + cin for every input.
module tb_ha2_chain;
  logic [5:0] x, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  ha2_chain #(.W(6)) dut (.x(x), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int v = 0; v < 64; v++) begin
        x = 6'(v); cin = 1'(c);
        #1;
        checks++;
        if ({cout, sum} != 7'(v + c)) begin
          failures++;
          $display("mismatch x=%0d cin=%0d got %0d", v, c, {cout, sum});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
