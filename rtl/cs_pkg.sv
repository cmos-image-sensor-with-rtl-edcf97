// cs_pkg: constants and types shared by the compressed-sensing image sensor.
//
// The sensor has a 256 x 256 pixel array cut into 16 x 16 pixel blocks, 256
// column-parallel sigma-delta ADCs and a compressed-sensing multiplexer
// (CS-MUX). Analog voltages (pixel lines, ADC inputs, the CS reference Vg)
// are carried through the models as unsigned integers in microvolts, measured
// from the ADC low reference. The ADC full scale is 4096 LSB of 242 uV.
//
// Numbers from the design description: array and block size, 128 coarse and
// 32 fine modulator cycles, 8 selected pixels per row, 242 uV/LSB, 12-bit
// output, Vg = 700 mV. The microvolt encoding and its 20-bit width are this
// implementation's own choice.
package cs_pkg;

  localparam int unsigned ROWS        = 256;  // pixel rows
  localparam int unsigned COLS        = 256;  // pixel columns = number of ADCs
  localparam int unsigned BLK         = 16;   // block edge in pixels
  localparam int unsigned NBLK        = COLS / BLK;  // 16 block columns / rows
  localparam int unsigned N_COARSE    = 128;  // coarse modulator cycles (7 bit)
  localparam int unsigned N_FINE      = 32;   // fine modulator cycles (5 bit)
  localparam int unsigned SEL_PER_ROW = 8;    // pixels picked per row by CSEL
  localparam int unsigned ADC_BITS    = 12;
  localparam int unsigned M_MAX       = 64;   // BS streams / samples per block at CR=1/4
  localparam int unsigned NSELECTORS  = COLS / 4;  // column selectors, 4 ADCs each

  localparam int unsigned VW          = 20;   // voltage word width (uV)
  localparam int unsigned LSB_UV      = 242;
  localparam int unsigned FS_UV       = (1 << ADC_BITS) * LSB_UV;  // 991232 uV
  localparam int unsigned VG_UV       = 700000;                    // CS reference Vg

  typedef logic [VW-1:0]       volt_t;
  typedef logic [ADC_BITS-1:0] code_t;

  // Compression ratio: number of samples / number of pixels.
  typedef enum logic [1:0] {
    CR_1  = 2'd0,   // normal capture, CS-MUX bypassed
    CR_4  = 2'd1,   // 1/4 : 4 blocks at a time, 64 ADCs per block
    CR_8  = 2'd2,   // 1/8 : 8 blocks at a time, 32 ADCs per block
    CR_16 = 2'd3    // 1/16: 16 blocks at a time, 16 ADCs per block
  } cr_e;

  // Samples per block m (= ADCs dedicated to one block).
  function automatic int unsigned samples_per_block(cr_e cr);
    case (cr)
      CR_4:    return 64;
      CR_8:    return 32;
      CR_16:   return 16;
      default: return 1;
    endcase
  endfunction

  // Block groups read one after another within a block row (16 / blocks per group).
  function automatic int unsigned groups_per_blkrow(cr_e cr);
    case (cr)
      CR_4:    return 4;
      CR_8:    return 2;
      default: return 1;
    endcase
  endfunction

  // Block column of ADC segment q for block group b.
  function automatic int unsigned seg_block(cr_e cr, int unsigned b, int unsigned q);
    return b + q * groups_per_blkrow(cr);
  endfunction

endpackage
