// tb_mem_buffer: self-checking test of the FIFO storage array.
//
// Writes random words to every location, reads each one back through the
// combinational read port and compares with a copy kept in the testbench;
// checks that read_data is zero while read_enable is low and that a write
// with write_enable low changes nothing.
module tb_mem_buffer;
  localparam int unsigned WIDTH = 12;
  localparam int unsigned DEPTH = 4;

  logic             clk = 0;
  logic [1:0]       write_addr, read_addr;
  logic             write_enable, read_enable;
  logic [WIDTH-1:0] write_data, read_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mem_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write_enable = 0; read_enable = 0; write_addr = 0; read_addr = 0; write_data = 0;
    for (int round = 0; round < 4; round++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        write_addr = 2'(a); write_data = WIDTH'($urandom); write_enable = 1;
        model[a] = write_data;
      end
      @(negedge clk); write_enable = 0;
      // a disabled write must not change the location
      write_addr = 2'(round); write_data = ~model[round];
      @(negedge clk);
      for (int a = 0; a < DEPTH; a++) begin
        read_addr = 2'(a); read_enable = 1; #1;
        check(read_data == model[a], $sformatf("read addr %0d got %h exp %h", a, read_data, model[a]));
        read_enable = 0; #1;
        check(read_data == '0, "read_data not zero with read_enable low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
