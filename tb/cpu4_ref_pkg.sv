// cpu4_ref_pkg: reference model of the 4-bit accumulator processor, used by
// the processor testbenches. It states each instruction by its meaning
// (w + L, w - L, ...) rather than by the multiplexer/adder structure, so it
// checks the datapath independently. Values are taken modulo 16.
package cpu4_ref_pkg;

  function automatic logic [3:0] ref_next(input logic [2:0] op, input logic [3:0] w,
                                          input logic [3:0] lit, input bit sign_fill);
    int wi = int'(w);
    int li = int'(lit);
    int r;
    int shr = (wi / 2) + ((sign_fill && wi >= 8) ? 8 : 0);  // w >> 1, sign filled if asked
    case (op)
      3'b010: r = 0;                                          // CLRW
      3'b001: r = li;                                         // MOVL
      3'b110: r = wi + 1;                                     // INCW
      3'b000: r = shr;                                        // ASHRW
      3'b111: r = wi + 16 - li;                               // SUBLW
      3'b101: r = wi + li;                                    // ADDLW
      3'b011: r = 15 - li;                                    // unused: ~L
      default: r = wi + shr;                                  // unused 100: w + (w>>1)
    endcase
    return 4'(r % 16);
  endfunction

  // Signed value of a 4-bit two's-complement word.
  function automatic int signed4(input logic [3:0] v);
    return (int'(v) >= 8) ? int'(v) - 16 : int'(v);
  endfunction

endpackage
