// tb_and_gate_array: exhaustive self-checking testbench for the AND gate
// array. Every combination of the four main inputs and the enable is applied
// to the default 4-wide array, and every combination of eight main inputs to
// an 8-wide one; each output bit is compared with the AND of its main input
// and the enable, computed bit by bit in the testbench.
module tb_and_gate_array;

  logic [3:0] in4, out4;
  logic [7:0] in8, out8;
  logic       enb;

  int checks = 0;
  int failures = 0;

  and_gate_array dut4 (.in_sig(in4), .enb_in(enb), .out_sig(out4));
  and_gate_array #(.N(8)) dut8 (.in_sig(in8), .enb_in(enb), .out_sig(out8));

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 256; v++) begin
        enb = e[0];
        in4 = v[3:0];
        in8 = v[7:0];
        #1;
        for (int i = 0; i < 8; i++) begin
          logic exp8;
          exp8 = (v[i] == 1'b1) && (e == 1);
          checks++;
          if (out8[i] !== exp8) begin
            failures++;
            $display("FAIL N=8 in=%h enb=%0d bit %0d = %b", v[7:0], e, i, out8[i]);
          end
          if (i < 4) begin
            checks++;
            if (out4[i] !== exp8) begin
              failures++;
              $display("FAIL N=4 in=%h enb=%0d bit %0d = %b", v[3:0], e, i, out4[i]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
