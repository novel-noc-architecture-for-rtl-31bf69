// mux4: 4:1 multiplexer in AND-OR form, one per crossbar output.
//
// Follows the source's multiplexer drawing: the two select lines s[1] and
// s[0] and their inverted copies feed four AND terms, one per data input,
// and an OR gate joins the four terms into y. Each bit of a WIDTH-bit word
// gets the same gate structure. Purely combinational.
module mux4 #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [3:0][WIDTH-1:0] i,
  input  logic [1:0]            s,
  output logic [WIDTH-1:0]      y
);

  logic s1_n, s0_n;
  logic [3:0] term_en;

  always_comb begin
    s1_n       = ~s[1];
    s0_n       = ~s[0];
    term_en[0] = s1_n & s0_n;
    term_en[1] = s1_n & s[0];
    term_en[2] = s[1] & s0_n;
    term_en[3] = s[1] & s[0];
    y = (i[0] & {WIDTH{term_en[0]}})
      | (i[1] & {WIDTH{term_en[1]}})
      | (i[2] & {WIDTH{term_en[2]}})
      | (i[3] & {WIDTH{term_en[3]}});
  end

endmodule
