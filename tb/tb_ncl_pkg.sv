// tb_ncl_pkg -- helpers shared by the testbenches.
//
// token_bit() gives the operand values of every token as a pure function of
// a seed, the token number and the wire number, so a sender and the
// checker of the receiver agree on the data without sharing a queue. A bit
// is 1 with probability 3/4, so that wide ANDs still produce 1s often.
package tb_ncl_pkg;

  function automatic logic token_bit(input int unsigned seed, input int unsigned k,
                                     input int unsigned i);
    logic [31:0] h;
    h = seed * 32'h9E37_79B1 ^ k * 32'h85EB_CA6B ^ (i + 1) * 32'hC2B2_AE35;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h[1:0] != 2'b00;
  endfunction

endpackage
