// tb_prefix_node: exhaustive check of the prefix operator against its definition
// (p, g) o (p', g') = (p p', g + p g'), all 16 input combinations.
module tb_prefix_node;
  logic p_hi, g_hi, p_lo, g_lo, p_out, g_out;
  int checks = 0, failures = 0;

  prefix_node dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {p_hi, g_hi, p_lo, g_lo} = 4'(v);
      #1;
      // carry leaves the combined span if the high span generates, or propagates a
      // carry generated by the low span
      checks++;
      if (g_out !== (g_hi || (p_hi && g_lo)) || p_out !== (p_hi && p_lo)) begin
        failures++;
        $display("FAIL v=%0d g=%b p=%b", v, g_out, p_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
