// mlpp_pkg - constants and types shared by the laser projector main driver.
//
// The projector shows a 200-pixel scan line with 50 lasers: every laser shows
// four pixels, one in each of four phases T1..T4. A pixel is the two most
// significant bits of the 8-bit video ADC (D7, D6), decoded as a brightness:
// 11 high, 10 medium, 01 low, 00 off. A lit laser stays on for a number of
// 50 MHz clocks set by that brightness. All numbers below are the design
// values of the prototype; the widths of the counters are this design's
// choice, picked to hold those values.
package mlpp_pkg;

  localparam int unsigned N_LASERS      = 50;   // two VCSEL dice of 25
  localparam int unsigned N_PHASES      = 4;    // pixels per laser
  localparam int unsigned HCNT_W        = 11;   // line counter width
  localparam int unsigned HCNT_MAX      = 1400; // line counter rolls over after this
  localparam int unsigned SAMPLE_STRIDE = 8;    // clocks between two pixels of one phase
  localparam int unsigned PIXEL_CLKS    = 2;    // clocks per pixel
  localparam int unsigned SAMPLE_BASE   = 100;  // hcnt of pixel 1
  localparam int unsigned TRIG_BASE     = 98;   // hcnt at which T1 starts
  localparam int unsigned TRIG_SPACING  = 317;  // T1..T4 start at 98, 415, 732, 1049
  localparam int unsigned TRIG_LEN      = 2;    // clocks a trigger stays high
  localparam int unsigned ACNT_W        = 9;    // laser actuator counter width
  localparam int unsigned ACNT_MAX      = 316;  // actuator counter rolls over after this
  localparam int unsigned ON_HIGH       = 314;  // laser-on clocks for each brightness
  localparam int unsigned ON_MED        = 157;
  localparam int unsigned ON_LOW        = 79;

  // 2-bit red code as it leaves the ADC: bit 1 = D7 (MSB), bit 0 = D6.
  typedef enum logic [1:0] {
    BR_OFF  = 2'b00,
    BR_LOW  = 2'b01,
    BR_MED  = 2'b10,
    BR_HIGH = 2'b11
  } bright_e;

  // Clocks a laser stays lit for a given code.
  function automatic int unsigned on_clocks(bright_e b);
    unique case (b)
      BR_HIGH: return ON_HIGH;
      BR_MED:  return ON_MED;
      BR_LOW:  return ON_LOW;
      default: return 0;
    endcase
  endfunction

endpackage
