// Shared types and constants of the CBSR receiver datapath.
//
// Samples are complex 16-bit two's complement values (the AD9361 delivers
// 12 significant bits in 16-bit words). Phases are 16-bit fractions of a full
// turn: 65536 is 2*pi, so wrap-around of a phase word is the natural modulo.
// The radio-frame geometry (preamble and midamble lengths, data block length,
// midambles per subframe for each coding rate) is not published numerically;
// the values below are this design's choices and every module takes them as
// parameters, so they can be changed in one place.
package cbsr_pkg;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx_t;

  // transmission modes (RADIO_CONFIG_REG[1:0])
  typedef enum logic [1:0] {
    MODE_DATA  = 2'd0,   // decoded data delivered, erroneous subframes dropped
    MODE_BER1  = 2'd1,   // test mode: bit/subframe error statistics
    MODE_BER2  = 2'd2,   // test mode: statistics, data also delivered
    MODE_RSVD  = 2'd3
  } tx_mode_e;

  localparam int ZC_LEN      = 31;   // Zadoff-Chu length of T_AMB and P_AMB
  localparam int CRI_STEP    = 2;    // cyclic-shift step between coding rates
  localparam int P_AMB_LEN   = ZC_LEN + 7*CRI_STEP; // cyclic prefix + ZC
  localparam int DATA_BLK_LEN = 240; // samples between two midambles
  localparam int CRI_EOT     = 7;    // coding-rate indicator of the EoT frame
  localparam int CRC_LEN     = 24;

  // F_AMB length in samples for RADIO_CONFIG_REG F_AMB code 0,1,2
  function automatic int unsigned f_amb_len(input logic [1:0] code);
    case (code)
      2'd0:    return 64;
      2'd1:    return 128;
      default: return 256;
    endcase
  endfunction

  // number of phase midambles (P_AMB + data block periods) in one subframe
  // for coding-rate indicator 0..6
  function automatic logic [4:0] num_phase_midamble(input logic [2:0] cri);
    case (cri)
      3'd0: return 5'd4;
      3'd1: return 5'd5;
      3'd2: return 5'd6;
      3'd3: return 5'd7;
      3'd4: return 5'd8;
      3'd5: return 5'd9;
      default: return 5'd10;
    endcase
  endfunction

  // atan(2^-i) in phase units (65536 = 2*pi)
  function automatic logic [15:0] cordic_atan(input int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;
      3: return 16'd1297;  4: return 16'd651;   5: return 16'd326;
      6: return 16'd163;   7: return 16'd81;    8: return 16'd41;
      9: return 16'd20;    10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;    13: return 16'd1;    14: return 16'd1;
      default: return 16'd0;
    endcase
  endfunction

  // Zadoff-Chu sequences z[n] = exp(-j*pi*u*n*(n+1)/31), scaled by 127:
  // root u=1 for the T_AMB preamble, root u=3 for the base P_AMB midamble.
  typedef logic signed [7:0] coef_arr_t [ZC_LEN];
  localparam coef_arr_t ZC_TAMB_RE = '{127, 124, 104, 44, -56, -126, -56, 104, 67, -121, 19, 87,
      -126, 117, -96, 87, -96, 117, -126, 87, 19, -121, 67, 104, -56, -126, -56, 44, 104, 124, 127};
  localparam coef_arr_t ZC_TAMB_IM = '{0, -26, -73, -119, -114, -13, 114, 73, -108, -38, 126, -92,
      13, 50, -83, 92, -83, 50, 13, -92, 126, -38, -108, 73, 114, -13, -114, -119, -73, -26, 0};
  localparam coef_arr_t ZC_PAMB_RE = '{127, 104, -32, -111, 124, -121, 124, -32, -126, -78, -56,
      -96, -121, 44, 67, -96, 67, 44, -121, -96, -56, -78, -126, -32, 124, -121, 124, -111, -32, 104, 127};
  localparam coef_arr_t ZC_PAMB_IM = '{0, -73, -123, 62, 26, -38, -26, 123, -13, -100, -114, -83, 38,
      119, -108, 83, -108, 119, 38, -83, -114, -100, -13, 123, -26, -38, 26, 62, -123, -73, 0};

  function automatic logic signed [15:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage
