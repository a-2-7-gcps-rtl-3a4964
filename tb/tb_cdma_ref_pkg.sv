// tb_cdma_ref_pkg - reference values for the testbenches, written
// independently of the RTL package: the length-8 Walsh codes as +1/-1 chips
// and the channel-to-code-slot wiring.
package tb_cdma_ref_pkg;

  // Walsh codes a..h, chip 0 first.
  localparam int WALSH [8][8] = '{
    '{ 1,  1,  1,  1,  1,  1,  1,  1},   // a
    '{-1,  1, -1,  1, -1,  1, -1,  1},   // b
    '{-1, -1,  1,  1, -1, -1,  1,  1},   // c
    '{-1,  1,  1, -1, -1,  1,  1, -1},   // d
    '{-1, -1, -1, -1,  1,  1,  1,  1},   // e
    '{-1,  1, -1,  1,  1, -1,  1, -1},   // f
    '{-1, -1,  1,  1,  1,  1, -1, -1},   // g
    '{-1,  1,  1, -1,  1, -1, -1,  1}    // h
  };

  // Code slot carrying each of the 7 channels; slot 4 ("e") repeats channel 2.
  localparam int SLOT_OF_CH [7] = '{0, 1, 2, 3, 5, 6, 7};

  // Bit of a code as stored in a code register (1 = +1), chip n.
  function automatic logic code_bit(input int code, input int n);
    return WALSH[code][n] > 0;
  endfunction

  // Line amplitude of chip n of a symbol carrying the 7-bit word w.
  function automatic int line_chip(input logic [6:0] w, input int n);
    automatic int s = 0;
    for (int slot = 0; slot < 8; slot++) begin
      automatic int ch = (slot == 4) ? 2 : (slot < 4 ? slot : slot - 1);
      s += (w[ch] ? 1 : -1) * WALSH[slot][n];
    end
    return s;
  endfunction

endpackage
