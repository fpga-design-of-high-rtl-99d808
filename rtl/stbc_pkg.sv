// stbc_pkg: constants and types shared by the STBC-OFDM downlink receiver
// blocks and the orthogonal error detector.
//
// The OFDM numerology (1024-point FFT, 128-sample cyclic prefix, 120 pilot
// and 720 data subcarriers, 40 data symbols per downlink sub-frame, 7 clock
// cycles of the 78.4 MHz core clock per 11.2 MHz sample) follows the system
// description. Word widths and the fixed-point formats are this design's own
// choice: complex samples are 16-bit two's complement pairs.
package stbc_pkg;

  // OFDM numerology
  localparam int unsigned FFT_N          = 1024;
  localparam int unsigned LOG2_FFT_N     = 10;
  localparam int unsigned CP_LEN         = 128;
  localparam int unsigned SYM_LEN        = FFT_N + CP_LEN;
  localparam int unsigned N_PILOT        = 120;
  localparam int unsigned N_DATA         = 720;
  localparam int unsigned DATA_SYMS      = 40;
  localparam int unsigned CLK_PER_SAMPLE = 7;     // 78.4 MHz / 11.2 MHz

  // Sample format
  localparam int unsigned DW = 16;
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Data subcarrier modulation
  typedef enum logic {MOD_QPSK = 1'b0, MOD_16QAM = 1'b1} mod_t;

  // Phase words: a full turn (2*pi) is 2**PHASE_W.
  localparam int unsigned PHASE_W = 24;

  // Number of CORDIC micro-rotations used by the rotators.
  localparam int unsigned CORDIC_ITER = 16;

  // atan(2**-i) in phase-word units: round(atan(2**-i) / (2*pi) * 2**24).
  function automatic logic [PHASE_W-1:0] cordic_atan(input int unsigned i);
    case (i)
      0:  return 24'd2097152;
      1:  return 24'd1238021;
      2:  return 24'd654136;
      3:  return 24'd332050;
      4:  return 24'd166669;
      5:  return 24'd83416;
      6:  return 24'd41718;
      7:  return 24'd20860;
      8:  return 24'd10430;
      9:  return 24'd5215;
      10: return 24'd2608;
      11: return 24'd1304;
      12: return 24'd652;
      13: return 24'd326;
      14: return 24'd163;
      15: return 24'd81;
      default: return '0;
    endcase
  endfunction

  // 1/K of a 16-step CORDIC (0.607253) in Q15.
  localparam int CORDIC_INV_GAIN_Q15 = 19898;

endpackage
