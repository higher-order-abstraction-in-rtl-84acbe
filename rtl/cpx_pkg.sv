// cpx_pkg: complex number type used by the parameterised complex adder.
// Each part is a 32-bit word, read as an IEEE-754 single or as a two's
// complement integer depending on the adder the complex adder is built with.
package cpx_pkg;

  typedef struct packed {
    logic [31:0] re;
    logic [31:0] im;
  } cpx_t;

endpackage
