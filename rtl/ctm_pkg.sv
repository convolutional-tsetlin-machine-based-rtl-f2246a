// ctm_pkg: constants and shared types of the convolutional Tsetlin machine
// accelerator for 4x4 Boolean images with a 2x2 convolution window.
//
// The numbers follow the accelerator's main configuration: two classes,
// 40 clauses per class, 9 patches per image, 8 features per patch (4 window
// bits plus 2+2 position bits), 16 literals, 8-bit Tsetlin automata,
// T = 40, s = 3.9 and a bank of 80 LFSRs. Chosen here (not fixed by the
// source): the 24-bit random fraction format and the LFSR length encoding.
package ctm_pkg;

  // Image and convolution geometry
  localparam int IMG_X    = 4;
  localparam int IMG_Y    = 4;
  localparam int WIN_X    = 2;
  localparam int WIN_Y    = 2;
  localparam int BX       = IMG_X - WIN_X + 1;            // 3
  localparam int BY       = IMG_Y - WIN_Y + 1;            // 3
  localparam int NPATCH   = BX * BY;                      // B = 9
  localparam int IMG_BITS = IMG_X * IMG_Y;                // 16
  localparam int NF       = WIN_X * WIN_Y + (BX - 1) + (BY - 1); // 8 features
  localparam int NLIT     = 2 * NF;                       // 16 literals

  // Machine size and learning hyperparameters
  localparam int NCLASS   = 2;
  localparam int NCLAUSE  = 40;                           // m
  localparam int TA_BITS  = 8;
  localparam int T_HYP    = 40;                           // T
  // s = S_NUM / S_DEN = 39/10 = 3.9
  localparam int S_NUM    = 39;
  localparam int S_DEN    = 10;

  // Class sum width: |v| <= m/2 = 20
  localparam int SUM_W    = 8;

  // Random numbers: every LFSR delivers a 24-bit fraction in [0,1)
  localparam int RND_W    = 24;
  localparam int NLFSR    = 2 * NCLAUSE;                  // Eq. (8): max(2m, 2(1+2NF)) = 80

  // Sample word held in the dataset RAM: {label, image}
  localparam int SAMPLE_W = IMG_BITS + 1;

  // Cycle budget
  localparam int ADD_STAGES    = $clog2(NCLAUSE);         // 6
  localparam int TRAIN_CYCLES  = NPATCH + ADD_STAGES + NCLAUSE; // 55

  // LFSR length selection, as programmed by the host
  typedef enum logic [3:0] {
    LEN6  = 4'd0, LEN7  = 4'd1, LEN8  = 4'd2, LEN9  = 4'd3, LEN10 = 4'd4,
    LEN12 = 4'd5, LEN14 = 4'd6, LEN16 = 4'd7, LEN18 = 4'd8, LEN24 = 4'd9
  } lfsr_len_e;

  typedef logic [NF-1:0]   feat_t;
  typedef logic [NLIT-1:0] lit_t;
  typedef logic [RND_W-1:0] rnd_t;
  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic signed [TA_BITS-1:0] ta_t;

  // Features -> literals, ordered as [x0, ~x0, x1, ~x1, ...]
  function automatic lit_t to_literals(feat_t f);
    lit_t l;
    for (int k = 0; k < NF; k++) begin
      l[2*k]   = f[k];
      l[2*k+1] = ~f[k];
    end
    return l;
  endfunction

  // Position code of Table 1: column/row 0 -> 2'b10, 1 -> 2'b01, 2 -> 2'b00
  function automatic logic [1:0] pos_code(int unsigned p);
    case (p)
      0:       return 2'b10;
      1:       return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

endpackage
