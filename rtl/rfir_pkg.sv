// rfir_pkg: constants and types shared by the reconfigurable APC-OMS FIR filter.
//
// The default sizes are those of the filter this RTL implements: 16 taps, a 4-bit
// unsigned input sample, 16-bit signed coefficients and a 32-bit output. The input is
// cut into R-bit digits (R = 4), each addressing an odd-multiple look-up table of
// 2^(R-2) = 4 words. The coefficient loader state type lives here as well.
package rfir_pkg;

  localparam int unsigned DEF_TAPS   = 16;  // filter taps
  localparam int unsigned DEF_L      = 4;   // input sample width
  localparam int unsigned DEF_R      = 4;   // digit width = APC-OMS address width
  localparam int unsigned DEF_COEF_W = 16;  // coefficient width
  localparam int unsigned DEF_Y_W    = 32;  // output width

  // Number of pipeline register stages from the clock edge that takes a sample
  // into the shift register to the edge that shows its contribution on y:
  // shift register + product register + adder tree levels + WTM register +
  // shift-add tree levels + output register.
  function automatic int unsigned filter_latency(int unsigned taps, int unsigned groups);
    int unsigned lv_taps, lv_groups;
    lv_taps   = (taps   > 1) ? $clog2(taps)   : 0;
    lv_groups = (groups > 1) ? $clog2(groups) : 0;
    return 4 + lv_taps + lv_groups;
  endfunction

  // Coefficient loader states.
  typedef enum logic [0:0] {
    LD_IDLE = 1'b0,  // waiting for a request
    LD_LOAD = 1'b1   // writing odd multiples, one word per cycle
  } loader_state_t;

endpackage
