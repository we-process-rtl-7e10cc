// tb_load_reg: checks reset to 0, load on enable and hold without it
// against a reference copy over random data and enables.
module tb_load_reg;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] d = 8'h00, q, model = 8'h00;
  int checks = 0, failures = 0;

  load_reg #(.W(8)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != 8'h00) failures++;
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom);
      d  = 8'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL: q=%02h expected %02h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
