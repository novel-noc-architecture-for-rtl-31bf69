// gray_pkg: Gray-to-binary conversion used by the dual-clock FIFO.
//
// The FIFO keeps binary pointers, as counters that step by one; only the
// copy that crosses into the other clock domain is Gray coded (g = b ^ b>>1,
// computed where the pointer is registered). The receiving side turns the
// synchronized Gray value back into binary with gray2bin: each binary bit is
// the XOR of all Gray bits at and above it. Works on up to 32-bit values;
// callers zero-extend and truncate to their width.
package gray_pkg;

  function automatic logic [31:0] gray2bin(input logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int i = 30; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
