// tb_mux4: self-checking test of the AND-OR 4:1 multiplexer.
//
// For random data words, drives every select value and compares y with the
// input the select value names.
module tb_mux4;
  localparam int unsigned WIDTH = 12;
  logic [3:0][WIDTH-1:0] i;
  logic [1:0]            s;
  logic [WIDTH-1:0]      y;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(WIDTH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 4; k++) i[k] = WIDTH'($urandom);
      for (int sv = 0; sv < 4; sv++) begin
        s = 2'(sv); #1;
        checks++;
        if (y !== i[sv]) begin
          failures++;
          $display("FAIL s=%0d y=%h exp=%h", sv, y, i[sv]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
