// cdma_pkg: constants and types shared by the code multiplexed SOC test
// architecture.
//
// The architecture tests several embedded cores at once over a single shared
// bus. Each core's test generator (TG) spreads its serial test data with a
// Walsh code of its own; the main controller adds the spread chips of all TGs
// and sends the sums over the bus; every core's decoder recovers its own bit
// stream by correlating the sums with its code.
//
// Sizes from the published architecture: five cores (an SOC built from the
// ISCAS'89 circuits s344, s349, s820, s832 and s1494) and 8-chip Walsh codes,
// which give seven balanced, mutually orthogonal codes. The core interface
// widths (primary inputs and outputs of each benchmark circuit), the pattern
// count width and the signature width are this design's own choices.
package cdma_pkg;

  // Number of cores under test and Walsh code length (chips per data bit).
  parameter int unsigned N_CORES  = 5;
  parameter int unsigned CODE_LEN = 8;

  // Widest core input pattern and widest core response (s820/s832: 18 inputs,
  // 19 outputs).
  parameter int unsigned MAX_PI = 18;
  parameter int unsigned MAX_PO = 19;

  // Per-core primary input / output counts of s344, s349, s820, s832, s1494.
  parameter int unsigned CORE_PI [N_CORES] = '{9, 9, 18, 18, 8};
  parameter int unsigned CORE_PO [N_CORES] = '{11, 11, 19, 19, 19};

  // Pattern counter and response signature widths.
  parameter int unsigned NPAT_W = 16;
  parameter int unsigned SIG_W  = 32;

  // Test generator modes: pseudo-random (Galois LFSR) or binary counter.
  typedef enum logic [0:0] {
    TG_LFSR  = 1'b0,
    TG_COUNT = 1'b1
  } tg_mode_e;

  // Run-time configuration of one core's test: generator setup and the
  // expected (fault-free) response signature.
  typedef struct packed {
    tg_mode_e              mode;
    logic [MAX_PI-1:0]     seed;
    logic [MAX_PI-1:0]     taps;
    logic [NPAT_W-1:0]     npat;
    logic [SIG_W-1:0]      golden;
  } core_cfg_t;

  // Response compactor feedback polynomial (CRC-32, Galois form).
  parameter logic [SIG_W-1:0] MISR_POLY = 32'h04C1_1DB7;

endpackage
