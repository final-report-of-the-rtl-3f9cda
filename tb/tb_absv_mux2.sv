// tb_absv_mux2 -- self-checking test of the sign-steered 2:1 multiplexer.
// Applies all eight input combinations; the expected output is looked up
// in a truth table written out by hand (bit k = output for {sel,a,b} = k).
module tb_absv_mux2;
  logic a_i, b_i, sel_i, y_o;
  int checks = 0, failures = 0;

  // {sel,a,b}: 000->0 001->1 010->0 011->1 100->0 101->0 110->1 111->1
  localparam logic [7:0] TRUTH = 8'b1100_1010;

  absv_mux2 dut (.a_i(a_i), .b_i(b_i), .sel_i(sel_i), .y_o(y_o));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {sel_i, a_i, b_i} = 3'(k);
      #1;
      checks++;
      if (y_o !== TRUTH[k]) begin
        failures++;
        $display("FAIL sel=%b a=%b b=%b y=%b exp=%b", sel_i, a_i, b_i, y_o, TRUTH[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
