// tb_demux: random bytes and selects; the selected output must carry the
// byte and the other output must be 0.
module tb_demux;
  logic [7:0] d;
  logic sel;
  logic [1:0][7:0] q;
  int checks = 0, failures = 0;

  demux #(.W(8), .N(2)) dut (.d, .sel, .q);

  initial begin
    for (int i = 0; i < 200; i++) begin
      d   = 8'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if (q[sel] != d || q[!sel] != 8'h00) begin
        failures++;
        $display("FAIL: d=%02h sel=%0d q=%04h", d, sel, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
