// omni_pkg: types and constants shared by the F-engine and X-engine of the
// 32-channel FFT-telescope correlator.
//
// The numbers below are the default configuration: 32 antenna channels
// sampled at 50 MHz by a 12-bit ADC, four channels time-multiplexed onto
// each 200 MHz bus, a 1024-point real FFT per channel (512 bins), 8+8 bit
// complex samples after the shifter/truncator, four frequency quarters
// (one per X-engine), 64 spectra folded together in the cross-correlator,
// and 36-bit words in the external QDR SRAMs.
//
// The QDR request/response structs describe the external SRAM port as this
// design uses it: one read and one write per cycle, a read returning its
// data a fixed QDR_RD_LAT cycles later. The latency value is this design's
// assumption; the 36-bit word and one read plus one write per cycle are the
// board's.
//
// When this package is compiled on its own, lint reports its constants
// as unused; the modules that import it use them.
package omni_pkg;

  localparam int unsigned ADC_BITS      = 12;  // ADC sample width
  localparam int unsigned ADC_MUX       = 4;   // channels per ADC bus
  localparam int unsigned FFT_BITS      = 18;  // width carried by every FFT stage
  localparam int unsigned TRUNC_BITS    = 8;   // real or imag after the truncator
  localparam int unsigned QDR_AW        = 20;  // QDR address width (assumed 1M words)
  localparam int unsigned QDR_DW        = 36;  // QDR data width
  localparam int unsigned QDR_RD_LAT    = 4;   // QDR read latency (assumed)
  localparam int unsigned TGE_DW        = 64;  // 10GbE data bus width

  // One complex sample as it leaves the shifter/truncator.
  typedef struct packed {
    logic signed [TRUNC_BITS-1:0] re;
    logic signed [TRUNC_BITS-1:0] im;
  } cplx8_t;

  // Request to one QDR SRAM: independent read and write ports.
  typedef struct packed {
    logic              rd;
    logic [QDR_AW-1:0] raddr;
    logic              wr;
    logic [QDR_AW-1:0] waddr;
    logic [QDR_DW-1:0] wdata;
  } qdr_req_t;

  // Response of one QDR SRAM: read data QDR_RD_LAT cycles after rd.
  typedef struct packed {
    logic              rvalid;
    logic [QDR_DW-1:0] rdata;
  } qdr_rsp_t;

  // One word of a 10GbE transmit or receive port.
  typedef struct packed {
    logic              valid;
    logic              eof;
    logic [TGE_DW-1:0] data;
  } tge_word_t;

  // Bit reversal of the low `bits` bits of x.
  function automatic int unsigned bitrev(input int unsigned x, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

endpackage
