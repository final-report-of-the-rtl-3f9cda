// tb_mirror_adder_carry -- self-checking test of the mirror-adder carry
// network.  For all eight inputs the expected output is the complement of
// bit 1 of the integer sum a + b + cin.
module tb_mirror_adder_carry;
  logic a_i, b_i, cin_i, cout_n_o;
  int checks = 0, failures = 0;

  mirror_adder_carry dut (.a_i(a_i), .b_i(b_i), .cin_i(cin_i), .cout_n_o(cout_n_o));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sum;
    for (int k = 0; k < 8; k++) begin
      {a_i, b_i, cin_i} = 3'(k);
      sum = 2'(a_i) + 2'(b_i) + 2'(cin_i);
      #1;
      checks++;
      if (cout_n_o !== ~sum[1]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b cout_n=%b", a_i, b_i, cin_i, cout_n_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
