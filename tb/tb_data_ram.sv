// tb_data_ram: random stores and loads against a model. Checks a write
// happens at the clock edge only when MW = 1 and the read is combinational.
module tb_data_ram;
  logic clk = 1'b0, mw;
  logic [15:0] adrs, data, out;
  logic [15:0] model [logic [15:0]];
  int checks = 0, failures = 0, n_wr = 0;

  data_ram #(.DATA_W(16), .DMEM_AW(16)) dut (.clk, .mw, .adrs, .data, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] pool [16];
    foreach (pool[k]) pool[k] = 16'($urandom);
    pool[0] = 16'h0000; pool[1] = 16'hFFFF;
    mw = 1'b0; adrs = '0; data = '0;
    for (int k = 0; k < 10000; k++) begin
      @(negedge clk);
      adrs = pool[$urandom_range(0, 15)];
      mw = (k < 16) ? 1'b1 : ($urandom_range(0, 2) == 0);
      if (k < 16) adrs = pool[k];
      data = 16'($urandom);
      #1;
      if (model.exists(adrs)) begin
        checks++;
        if (out !== model[adrs]) begin
          failures++;
          if (failures < 20) $display("FAIL read %h: %h expected %h", adrs, out, model[adrs]);
        end
      end
      @(posedge clk);
      if (mw) begin model[adrs] = data; n_wr++; end
      #1;
      checks++;
      if (out !== model[adrs]) begin
        failures++;
        if (failures < 20) $display("FAIL after edge %h: %h expected %h", adrs, out, model[adrs]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
