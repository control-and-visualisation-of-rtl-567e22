// sdr_pkg: types, constants and filter-coefficient formulas shared by the QPSK
// transceiver. Samples are 16-bit signed two's complement, as the transceiver
// keeps every stage at 16 bits. A complex sample packs I in the low half and Q
// in the high half of a 32-bit word, which is also the layout of every
// observation-point stream and of the 32-bit DAC stream. Filter coefficients are
// not tabulated anywhere: each filter computes its own taps at elaboration from
// the closed-form prototypes below (root raised cosine, Hamming-windowed sinc
// low-pass/half-band, and a frequency-sampled CIC droop compensator), quantised
// to 18-bit signed numbers with 16 fraction bits. The prototypes, tap counts
// and roll-off are this design's choices; the filter types and rate changes
// follow the transceiver description.
package sdr_pkg;

  localparam int SW    = 16;  // sample width
  localparam int CFRAC = 16;  // coefficient fraction bits

  typedef logic signed [SW-1:0] sample_t;
  typedef struct packed {
    sample_t q;
    sample_t i;
  } iq_t;

  // Master AXI-Stream towards a DMA (tready travels separately)
  typedef struct packed {
    logic [31:0] tdata;
    logic        tvalid;
    logic        tlast;
  } axis32_t;

  // AXI4-Lite, one bundle per direction
  localparam int AXIL_AW = 12;
  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [31:0]        wdata;
    logic [3:0]         wstrb;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  typedef enum logic [1:0] {
    FK_RRC  = 2'd0,   // root raised cosine, SPS samples per symbol
    FK_LPF  = 2'd1,   // windowed sinc, cut-off at half the low rate (L=2: half-band)
    FK_CFIR = 2'd2    // low-pass with inverse-sinc^N boost (CIC compensation)
  } fir_kind_e;

  localparam real PI       = 3.14159265358979;
  localparam real RRC_BETA = 0.5;

  function automatic real sinc(real x);
    if (x < 1.0e-9 && x > -1.0e-9) return 1.0;
    return $sin(PI * x) / (PI * x);
  endfunction

  function automatic real hamming(int n, int ntaps);
    if (ntaps < 2) return 1.0;
    return 0.54 - 0.46 * $cos(2.0 * PI * n / (ntaps - 1));
  endfunction

  // Unnormalised prototype tap n of an ntaps-long filter.
  // l: rate-change factor (or samples per symbol for FK_RRC); cic_n: CIC order.
  function automatic real fir_proto(fir_kind_e kind, int n, int ntaps, int l, int cic_n);
    real t, b, h, f, hf, num, den;
    t = real'(n) - real'(ntaps - 1) / 2.0;
    case (kind)
      FK_RRC: begin
        b = RRC_BETA;
        t = t / real'(l);
        if (t < 1.0e-9 && t > -1.0e-9)
          h = 1.0 - b + 4.0 * b / PI;
        else if ((4.0 * b * t - 1.0) ** 2 < 1.0e-12 || (4.0 * b * t + 1.0) ** 2 < 1.0e-12)
          h = b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b))
                              + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
        else begin
          num = $sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b));
          den = PI * t * (1.0 - (4.0 * b * t) ** 2);
          h = num / den;
        end
      end
      FK_LPF: h = sinc(t / real'(l)) * hamming(n, ntaps);
      default: begin
        // frequency sampling on 64 points of [0, 0.5): 1/sinc(f)^N up to 0.2,
        // linear taper to zero at 0.3 (f in cycles per high-rate sample)
        h = 0.0;
        for (int k = 0; k < 64; k++) begin
          f = real'(k) / 128.0;
          if (f <= 0.2) hf = 1.0 / (sinc(f) ** cic_n);
          else if (f < 0.3) hf = (0.3 - f) / 0.1 / (sinc(0.2) ** cic_n);
          else hf = 0.0;
          h += (k == 0 ? 1.0 : 2.0) * hf * $cos(2.0 * PI * f * t);
        end
        h = h * hamming(n, ntaps);
      end
    endcase
    return h;
  endfunction

  // Quantised tap: the prototype normalised to a DC gain of dc_gain
  // (L for an interpolator so that every polyphase branch has unity gain).
  function automatic int fir_coef(fir_kind_e kind, int n, int ntaps, int l, int cic_n,
                                  real dc_gain);
    real s;
    s = 0.0;
    for (int k = 0; k < ntaps; k++) s += fir_proto(kind, k, ntaps, l, cic_n);
    return $rtoi(fir_proto(kind, n, ntaps, l, cic_n) / s * dc_gain * 65536.0
                 + (fir_proto(kind, n, ntaps, l, cic_n) >= 0.0 ? 0.5 : -0.5));
  endfunction

  function automatic sample_t sat16(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return -16'sh8000;
    return sample_t'(v);
  endfunction

  // Sine/cosine table entry, amplitude 32767, for a table of
  // 2^bits entries over one turn
  function automatic sample_t cos_entry(int k, int bits);
    return sample_t'($rtoi($floor($cos(2.0 * PI * k / (2.0 ** bits)) * 32767.0 + 0.5)));
  endfunction
  function automatic sample_t sin_entry(int k, int bits);
    return sample_t'($rtoi($floor($sin(2.0 * PI * k / (2.0 ** bits)) * 32767.0 + 0.5)));
  endfunction

endpackage
