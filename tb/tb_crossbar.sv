// tb_crossbar: self-checking test of the 5x5 crossbar.
//
// Random flits on all five inputs and random selects on all five outputs;
// each output must carry the input its select names, counting the four
// other ports in ascending order with the output's own port skipped, and
// out_valid must follow sel_valid.
module tb_crossbar;
  import noc_pkg::*;
  flit_t [NUM_PORTS-1:0]      in_data, out_data;
  logic  [NUM_PORTS-1:0][1:0] sel;
  logic  [NUM_PORTS-1:0]      sel_valid, out_valid;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_data[p]   = flit_t'($urandom);
        sel[p]       = 2'($urandom);
        sel_valid[p] = 1'($urandom);
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        int src;
        // the four inputs of output o, own port left out
        src = (int'(sel[o]) < o) ? int'(sel[o]) : int'(sel[o]) + 1;
        checks += 2;
        if (out_data[o] != in_data[src]) begin
          failures++; $display("FAIL out %0d sel %0d got %h exp %h", o, sel[o], out_data[o], in_data[src]);
        end
        if (out_valid[o] != sel_valid[o]) begin
          failures++; $display("FAIL out_valid %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
