// ddfs_pkg -- widths and constants shared by the single-LIF-neuron DDFS.
//
// The neuron's two counters (synaptic and core/membrane) are 8 bits wide and
// the sine table holds 256 bytes in 2.6 fixed point (2 integer bits, 6
// fraction bits), as the design is specified.  The phase accumulator is the 8
// table-address bits plus the two quadrant bits (10 bits); the 4-bit leak
// period field, the amplitude scale and the ISI offset are this design's own
// choices.
package ddfs_pkg;

  // Neuron counters (synaptic block, core block): 8 bits.
  localparam int unsigned CNT_W = 8;
  // Leak period field: one hex digit.
  localparam int unsigned LEAK_W = 4;

  // Sine table: 2^LUT_ADDR_W entries of LUT_DATA_W bits in 2.6 fixed point.
  localparam int unsigned LUT_ADDR_W = 8;
  localparam int unsigned LUT_DATA_W = 8;
  localparam int unsigned LUT_FRAC_W = 6;
  // Largest table entry: 1.0 in 2.6 format.
  localparam int unsigned AMP_MAX = 1 << LUT_FRAC_W;

  // Phase accumulator: two quadrant bits above the table address.
  localparam int unsigned PHASE_W = LUT_ADDR_W + 2;

  // Signed sample: one sign bit above the table data.
  localparam int unsigned SAMPLE_W = LUT_DATA_W + 1;

  // Output inter-spike interval Q = ISI_OFFSET + sample, always >= 1 cycle.
  localparam int unsigned ISI_W = LUT_DATA_W;
  localparam int unsigned ISI_OFFSET = AMP_MAX + 1;

  typedef logic [CNT_W-1:0]           cnt_t;
  typedef logic [LEAK_W-1:0]          leak_t;
  typedef logic [PHASE_W-1:0]         phase_t;
  typedef logic [LUT_ADDR_W-1:0]      lut_addr_t;
  typedef logic [LUT_DATA_W-1:0]      lut_data_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [ISI_W-1:0]           isi_t;

  // Run-time neuron settings (the adjustable w, th, leak period and
  // excitatory/inhibitory selection of the digital LIF model).
  typedef struct packed {
    cnt_t  weight;       // synaptic pulse length w, in cycles
    cnt_t  threshold;    // firing threshold th
    leak_t leak_period;  // cycles per leak decrement, 0 = no leak
    logic  exc_inh;      // 1 = excitatory (count up), 0 = inhibitory
  } neuron_cfg_t;

endpackage
