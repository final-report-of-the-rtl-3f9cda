// tb_absv_inv -- self-checking test of the inverter cell.
// Drives both input values and compares the output with the expected
// complement.  Combinational: each vector settles for 1 time unit.
module tb_absv_inv;
  logic in_i, out_o;
  int checks = 0, failures = 0;

  absv_inv dut (.in_i(in_i), .out_o(out_o));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      in_i = r[0];
      #1;
      checks++;
      if (out_o !== (r[0] ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL in=%b out=%b", in_i, out_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
