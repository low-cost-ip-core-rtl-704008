// ttbc_pkg: shared types and code-space helpers for the tri-template-based
// code (TTBC) test decompressor.
//
// An I-bit channel word selects one of 2^I codes. The first 2^I-3 codes name a
// scan chain whose slice bit is to be flipped; the last three select a
// template for the next slice: previous slice, all 0 and all 1, in that order.
// The code assignment follows the 3-to-5 example of the method (101 previous,
// 110 all 0, 111 all 1) generalised to any I.
package ttbc_pkg;

  // Template chosen for a slice.
  typedef enum logic [1:0] {
    TPL_PREV = 2'd0,   // keep the previously decoded slice
    TPL_ZERO = 2'd1,   // all 0
    TPL_ONE  = 2'd2    // all 1
  } template_e;

  // Largest number of scan chains an I-input decoder can serve.
  function automatic int unsigned max_chains(input int unsigned i);
    return (1 << i) - 3;
  endfunction

  // Channel code that selects a template.
  function automatic int unsigned template_code(input int unsigned i, input template_e t);
    return (1 << i) - 3 + int'(t);
  endfunction

  // Feedback taps (bit k set means stage k+1 feeds back) for the response
  // compactor. Values are primitive polynomials from the usual maximal-length
  // LFSR tables for the chain counts of the evaluated configurations; other
  // widths fall back to x^n + x + 1.
  function automatic logic [127:0] misr_taps(input int unsigned n);
    logic [127:0] t;
    t = '0;
    case (n)
      5:       begin t[4] = 1'b1; t[2] = 1'b1; end
      13:      begin t[12] = 1'b1; t[3] = 1'b1; t[2] = 1'b1; t[0] = 1'b1; end
      29:      begin t[28] = 1'b1; t[26] = 1'b1; end
      61:      begin t[60] = 1'b1; t[59] = 1'b1; t[45] = 1'b1; t[44] = 1'b1; end
      125:     begin t[124] = 1'b1; t[123] = 1'b1; t[17] = 1'b1; t[16] = 1'b1; end
      default: begin t[n-1] = 1'b1; t[0] = 1'b1; end
    endcase
    return t;
  endfunction

endpackage
