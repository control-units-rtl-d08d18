// tb_mux2: random inputs on both select values, output compared with the
// selected input.
module tb_mux2;
  logic sel;
  logic [15:0] in0, in1, y;
  int checks = 0, failures = 0;

  mux2 #(.W(16)) dut (.sel, .in0, .in1, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      sel = k[0]; in0 = 16'($urandom); in1 = 16'($urandom);
      #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%b y=%h in0=%h in1=%h", sel, y, in0, in1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
