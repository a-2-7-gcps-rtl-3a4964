// cdma_pkg - types and constants shared by the CDMA serial transmitter and receiver.
//
// A spread code is 8 chips long. A code is held as an 8-bit vector indexed
// [0:7] so that bit 0 is the first chip sent; a bit value 1 stands for a chip
// of +1 and 0 for a chip of -1. The default code set is the length-8 Walsh set
// "a".."h". The two codes used for synchronization, "c" and "e", and their
// one-chip rotations to the right and left are the synchronizer's fixed codes.
//
// Seven data channels share eight codes: codes "c" and "e" must carry the same
// bit so that the product of their correlations does not depend on the data.
// Channel 2 therefore drives both code slot 2 ("c") and code slot 4 ("e");
// the other channels map one to one onto the remaining slots.
package cdma_pkg;

  localparam int unsigned CODE_LEN = 8;   // chips per symbol
  localparam int unsigned N_CODES  = 8;   // code slots (Walsh codes a..h)
  localparam int unsigned N_CH     = 7;   // data channels

  typedef logic [0:CODE_LEN-1] code_t;

  // Length-8 Walsh codes, chip 0 first, 1 = +1, 0 = -1.
  localparam code_t WALSH_A = 8'b1111_1111;
  localparam code_t WALSH_B = 8'b0101_0101;
  localparam code_t WALSH_C = 8'b0011_0011;
  localparam code_t WALSH_D = 8'b0110_0110;
  localparam code_t WALSH_E = 8'b0000_1111;
  localparam code_t WALSH_F = 8'b0101_1010;
  localparam code_t WALSH_G = 8'b0011_1100;
  localparam code_t WALSH_H = 8'b0110_1001;

  localparam code_t [0:N_CODES-1] WALSH_SET = '{WALSH_A, WALSH_B, WALSH_C, WALSH_D,
                                                WALSH_E, WALSH_F, WALSH_G, WALSH_H};

  // Synchronizer codes: "c" and "e" as they are, rotated one chip right
  // (late replica) and rotated one chip left (early replica).
  localparam code_t SYNC_C       = 8'b0011_0011;
  localparam code_t SYNC_E       = 8'b0000_1111;
  localparam code_t SYNC_C_RIGHT = 8'b1001_1001;
  localparam code_t SYNC_E_RIGHT = 8'b1000_0111;
  localparam code_t SYNC_C_LEFT  = 8'b0110_0110;
  localparam code_t SYNC_E_LEFT  = 8'b0001_1110;

  // Code slot of "e", and the channel that feeds both "c" (slot 2) and "e".
  localparam int unsigned SLOT_E     = 4;
  localparam int unsigned SHARED_CH  = 2;

  // Code slot that carries data channel ch (ch = 0..6).
  function automatic int unsigned ch_to_slot(input int unsigned ch);
    return (ch < SLOT_E) ? ch : ch + 1;
  endfunction

  // Data channel that feeds code slot s (s = 0..7).
  function automatic int unsigned slot_to_ch(input int unsigned s);
    if (s == SLOT_E) return SHARED_CH;
    return (s < SLOT_E) ? s : s - 1;
  endfunction

  // Synchronization phase reported by the control unit (CntSW).
  typedef enum logic {
    PHASE_CODE_SYNC = 1'b0,   // rotating clocks, delay control held constant
    PHASE_CHIP_SYNC = 1'b1    // rotation frozen, delay-locked loop running
  } sync_phase_e;

endpackage
