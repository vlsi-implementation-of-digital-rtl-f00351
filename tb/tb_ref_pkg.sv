// tb_ref_pkg: reference models used by the keying testbenches.
//
// ref_sine gives the expected carrier sample for phase index k of a table of
// 2**aw points: 32768 + round(32767 * sin(2*pi*k / 2**aw)), 16-bit offset
// binary. It is written apart from the RTL table so the two can disagree.
package tb_ref_pkg;

  function automatic logic [15:0] ref_sine(int unsigned k, int aw);
    real x;
    int  s;
    x = $sin(6.283185307179586 * real'(k % (1 << aw)) / real'(1 << aw));
    s = 32768 + int'($floor(32767.0 * x + 0.5));
    return 16'(s);
  endfunction

  // Word i of the default PROM image.
  function automatic logic [15:0] ref_prom(int unsigned i);
    case (i)
      0:  return 16'b0000000110100010;
      1:  return 16'b0011001100110011;
      2:  return 16'hAAAA;
      3:  return 16'h5555;
      4:  return 16'hFFFF;
      5:  return 16'h0000;
      6:  return 16'hF0F0;
      7:  return 16'h0F0F;
      8:  return 16'h8001;
      9:  return 16'h7FFE;
      10: return 16'hC3C3;
      11: return 16'h3C3C;
      12: return 16'h1234;
      13: return 16'hABCD;
      14: return 16'hDEAD;
      default: return 16'hBEEF;
    endcase
  endfunction

endpackage
