// tb_and3_gate_array: exhaustive self-checking testbench for the three-input
// AND gate array. All 16 main-input patterns of the default 4-wide array are
// applied with all four combinations of the two enables; each output bit must
// be high exactly when its main input and both enables are high.
module tb_and3_gate_array;

  logic [3:0] in_sig, out_sig;
  logic       enb_a, enb_b;

  int checks = 0;
  int failures = 0;

  and3_gate_array dut (.in_sig(in_sig), .enb_a(enb_a), .enb_b(enb_b), .out_sig(out_sig));

  initial begin
    for (int e = 0; e < 4; e++) begin
      for (int v = 0; v < 16; v++) begin
        enb_a  = e[0];
        enb_b  = e[1];
        in_sig = v[3:0];
        #1;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (out_sig[i] !== (v[i] && (e == 3))) begin
            failures++;
            $display("FAIL in=%b enb_a=%0d enb_b=%0d bit %0d = %b", v[3:0], e[0], e[1], i, out_sig[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
