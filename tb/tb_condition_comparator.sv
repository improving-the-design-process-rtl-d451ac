// tb_condition_comparator: self-checking test of the debug-condition
// comparator. Random watch/reference pairs, half of them forced equal and
// some differing in a single bit, are applied to a 16-bit and a 5-bit
// instance; the expected match is worked out bit by bit in the testbench.
module tb_condition_comparator;
  int checks = 0, failures = 0;

  logic [15:0] w16, r16;
  logic [4:0]  w5, r5;
  logic        m16, m5;

  condition_comparator #(.WIDTH(16)) dut16 (.watch(w16), .ref_value(r16), .match(m16));
  condition_comparator #(.WIDTH(5))  dut5  (.watch(w5),  .ref_value(r5),  .match(m5));

  function automatic bit same_bits16(logic [15:0] a, logic [15:0] b);
    for (int i = 0; i < 16; i++) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      w16 = 16'($urandom);
      case (n % 3)
        0: r16 = w16;
        1: r16 = w16 ^ (16'd1 << (n % 16));
        default: r16 = 16'($urandom);
      endcase
      w5 = 5'($urandom);
      r5 = (n % 2 == 0) ? w5 : 5'($urandom);
      #1;
      checks++;
      if (m16 !== same_bits16(w16, r16)) begin
        failures++;
        $display("ERROR 16-bit: watch=%h ref=%h match=%b", w16, r16, m16);
      end
      checks++;
      if (m5 !== (w5 == r5)) begin
        failures++;
        $display("ERROR 5-bit: watch=%h ref=%h match=%b", w5, r5, m5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
