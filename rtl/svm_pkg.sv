// svm_pkg: types, constants and the default coefficient image shared by the
// bearing fault accelerator.
//
// Number formats: samples are signed 8-bit (two per 16-bit word), features and
// weights are 18-bit, products, biases and decision values are 36-bit signed.
// A feature vector holds three features per channel (peak, MAV, zero-crossing
// count) for up to two channels (drive end, fan end): index ch*3 + k with
// k = 0 peak, 1 MAV, 2 ZC.
//
// One coefficient word per one-vs-one class pair holds the pair's two class
// labels (4 bits each), six 18-bit weights and two 36-bit biases, one bias per
// channel: 188 bits per pair, 45 pairs, 8460 bits in all. The weights and
// biases are meant to already contain the feature normalisation
// (w' = w / sigma, b' = b - w'.mu), so no normalisation happens at run time.
//
// The trained CWRU coefficients are not part of this design. default_coeffs()
// builds an illustrative stand-in: a nearest-centroid classifier over made-up
// class centroids, written as 45 linear one-vs-one decisions
// f = 2(ca - cb).x - |ca|^2 + |cb|^2, which is >= 0 when x is at least as
// close to ca as to cb. Replace it with trained values through the
// COEFFS parameter of the top.
package svm_pkg;

  localparam int SAMPLE_W     = 8;    // signed ADC sample
  localparam int WORD_W       = 16;   // two samples per buffer word and channel
  localparam int FEAT_W       = 18;   // feature and weight width
  localparam int ACC_W        = 36;   // product, bias and decision width
  localparam int N_CLASSES    = 10;
  localparam int CLS_W        = 4;
  localparam int N_PAIRS      = N_CLASSES * (N_CLASSES - 1) / 2;   // 45
  localparam int PAIR_W       = 6;
  localparam int MAX_CH       = 2;    // drive end and fan end
  localparam int FEATS_PER_CH = 3;    // peak, MAV, ZC
  localparam int N_FEAT       = MAX_CH * FEATS_PER_CH;             // 6

  typedef logic [FEAT_W-1:0]        feat_t;
  typedef logic signed [FEAT_W-1:0] weight_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [CLS_W-1:0]         class_t;
  typedef feat_t [N_FEAT-1:0]       feat_vec_t;

  typedef struct packed {
    class_t                   class_a;  // voted for when the decision is >= 0
    class_t                   class_b;  // voted for when the decision is < 0
    weight_t [N_FEAT-1:0]     w;        // w[ch*3 + k]
    acc_t    [MAX_CH-1:0]     b;        // b[ch]
  } coeff_word_t;

  typedef coeff_word_t [N_PAIRS-1:0] coeff_rom_t;

  // Magnitude of a signed 8-bit sample; |-128| = 128 needs the ninth bit.
  function automatic logic [SAMPLE_W:0] abs_sample(logic signed [SAMPLE_W-1:0] x);
    logic signed [SAMPLE_W:0] xe;
    xe = {x[SAMPLE_W-1], x};
    return xe[SAMPLE_W] ? (SAMPLE_W+1)'(-xe) : (SAMPLE_W+1)'(xe);
  endfunction

  // Illustrative class centroid: feature k of channel ch for class c.
  function automatic int centroid(int c, int ch, int k);
    case (k)
      0:       return 20 + (c * 37) % 100 + 6 * ch;   // peak, 0..128
      1:       return 4 + (c * 13) % 40 + 3 * ch;     // MAV, 0..128
      default: return 10 + (c * 71) % 300 + 20 * ch;  // ZC count, 0..512
    endcase
  endfunction

  // Pair p enumerates (a, b) with a < b in the order (0,1), (0,2) .. (8,9).
  function automatic coeff_rom_t default_coeffs();
    coeff_rom_t rom;
    int p;
    longint sa, sb;
    p = 0;
    for (int a = 0; a < N_CLASSES; a++) begin
      for (int b = a + 1; b < N_CLASSES; b++) begin
        rom[p].class_a = class_t'(a);
        rom[p].class_b = class_t'(b);
        for (int ch = 0; ch < MAX_CH; ch++) begin
          sa = 0;
          sb = 0;
          for (int k = 0; k < FEATS_PER_CH; k++) begin
            rom[p].w[ch*FEATS_PER_CH + k] =
              weight_t'(2 * (centroid(a, ch, k) - centroid(b, ch, k)));
            sa += longint'(centroid(a, ch, k)) * centroid(a, ch, k);
            sb += longint'(centroid(b, ch, k)) * centroid(b, ch, k);
          end
          rom[p].b[ch] = acc_t'(sb - sa);
        end
        p++;
      end
    end
    return rom;
  endfunction

endpackage
