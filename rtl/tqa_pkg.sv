// tqa_pkg: shared types, constants and coefficient tables of the TQA softmax.
//
// The quadratic units evaluate y = w2*M1^2 + w1*(M1+M2) + w0 per segment. The
// coefficients below are fixed-point constants, one set per segment selected by
// the top N0 bits of the unit's input (M0); the case statements synthesise to
// the coefficient multiplexers in front of the first pipeline register.
//
// How the constants are obtained (this design's own numbers, following the
// method of the TQA scheme):
//   * per segment i, a least-squares fit of f(x_i + t) = w2*t^2 + w1*t + w0 over
//     every input code t of the segment, with f = 2^x on [0,1) (16 segments) or
//     f = log2(x) on [1,2) (32 segments);
//   * each coefficient is rounded to its fraction width by floor or ceil; of the
//     eight floor/ceil combinations the one whose bit-exact hardware result
//     (truncated squarer and multipliers included) has the smallest maximum
//     error over the segment is kept.
// Fraction widths: exp w2 16, w1 20, w0 24; log |w2| 14, w1 19, w0 24 bits.
// The log quadratic coefficient is negative and is stored as its magnitude; the
// unit subtracts the quadratic term for TQA_LOG.
// Field formats: w2 is an unsigned fraction (<1), w1 and w0 carry one integer bit.
package tqa_pkg;

  typedef enum logic {TQA_EXP = 1'b0, TQA_LOG = 1'b1} tqa_func_e;

  // Fraction bits of the final result and of the exponent/log unit outputs.
  localparam int unsigned TQA_OUT_F = 24;

  typedef struct packed {
    logic [15:0] w2;  // |w2|, LSB = 2^-W2_F
    logic [20:0] w1;  // w1,   LSB = 2^-W1_F
    logic [24:0] w0;  // w0,   LSB = 2^-24
  } tqa_coef_t;

  // exp: 16 segments
  function automatic tqa_coef_t exp_coef(input logic [3:0] seg);
    unique case (seg)
      4'd0 : exp_coef = '{w2: 16'h3ed9, w1: 21'h0b1697, w0: 25'h100000c};
      4'd1 : exp_coef = '{w2: 16'h41a2, w1: 21'h0b9444, w0: 25'h10b5593};
      4'd2 : exp_coef = '{w2: 16'h4489, w1: 21'h0c1781, w0: 25'h1172b91};
      4'd3 : exp_coef = '{w2: 16'h4792, w1: 21'h0ca08e, w0: 25'h12387b5};
      4'd4 : exp_coef = '{w2: 16'h4abd, w1: 21'h0d2fac, w0: 25'h1306fef};
      4'd5 : exp_coef = '{w2: 16'h4e0c, w1: 21'h0dc520, w0: 25'h13dea74};
      4'd6 : exp_coef = '{w2: 16'h5181, w1: 21'h0e6132, w0: 25'h14bfdbd};
      4'd7 : exp_coef = '{w2: 16'h551d, w1: 21'h0f042d, w0: 25'h15ab08e};
      4'd8 : exp_coef = '{w2: 16'h58e1, w1: 21'h0fae60, w0: 25'h16a09f7};
      4'd9 : exp_coef = '{w2: 16'h5cd1, w1: 21'h10601b, w0: 25'h17a1159};
      4'd10: exp_coef = '{w2: 16'h60ed, w1: 21'h1119b4, w0: 25'h18ace66};
      4'd11: exp_coef = '{w2: 16'h6537, w1: 21'h11db86, w0: 25'h19c492b};
      4'd12: exp_coef = '{w2: 16'h69b2, w1: 21'h12a5ec, w0: 25'h1ae8a0e};
      4'd13: exp_coef = '{w2: 16'h6e60, w1: 21'h137948, w0: 25'h1c199d3};
      4'd14: exp_coef = '{w2: 16'h7343, w1: 21'h1455ff, w0: 25'h1d581a4};
      4'd15: exp_coef = '{w2: 16'h785e, w1: 21'h153c7d, w0: 25'h1ea4b11};
      default: exp_coef = '{w2: '0, w1: '0, w0: '0};
    endcase
  endfunction

  // log: 32 segments
  function automatic tqa_coef_t log_coef(input logic [4:0] seg);
    unique case (seg)
      5'd0 : log_coef = '{w2: 16'h2cc2, w1: 21'h0b8a15, w0: 25'h000000b};
      5'd1 : log_coef = '{w2: 16'h2a20, w1: 21'h0b3099, w0: 25'h00b5d74};
      5'd2 : log_coef = '{w2: 16'h27b9, w1: 21'h0adc60, w0: 25'h0166400};
      5'd3 : log_coef = '{w2: 16'h2583, w1: 21'h0a8cf5, w0: 25'h02118ba};
      5'd4 : log_coef = '{w2: 16'h237c, w1: 21'h0a41f4, w0: 25'h02b803c};
      5'd5 : log_coef = '{w2: 16'h219e, w1: 21'h09fb00, w0: 25'h0359ec4};
      5'd6 : log_coef = '{w2: 16'h1fe5, w1: 21'h09b7c8, w0: 25'h03f7834};
      5'd7 : log_coef = '{w2: 16'h1e4d, w1: 21'h097803, w0: 25'h0491025};
      5'd8 : log_coef = '{w2: 16'h1cd3, w1: 21'h093b6c, w0: 25'h05269e7};
      5'd9 : log_coef = '{w2: 16'h1b73, w1: 21'h0901cc, w0: 25'h05b888c};
      5'd10: log_coef = '{w2: 16'h1a2c, w1: 21'h08cae8, w0: 25'h0646eef};
      5'd11: log_coef = '{w2: 16'h18fc, w1: 21'h089691, w0: 25'h06d1fb4};
      5'd12: log_coef = '{w2: 16'h17e0, w1: 21'h08649c, w0: 25'h0759d54};
      5'd13: log_coef = '{w2: 16'h16d6, w1: 21'h0834e0, w0: 25'h07dea19};
      5'd14: log_coef = '{w2: 16'h15de, w1: 21'h080736, w0: 25'h086082c};
      5'd15: log_coef = '{w2: 16'h14f4, w1: 21'h07db7d, w0: 25'h08df98c};
      5'd16: log_coef = '{w2: 16'h1419, w1: 21'h07b198, w0: 25'h095c01e};
      5'd17: log_coef = '{w2: 16'h134b, w1: 21'h078967, w0: 25'h09d5da3};
      5'd18: log_coef = '{w2: 16'h1289, w1: 21'h0762d2, w0: 25'h0a4d3c5};
      5'd19: log_coef = '{w2: 16'h11d4, w1: 21'h073dc0, w0: 25'h0ac2414};
      5'd20: log_coef = '{w2: 16'h1127, w1: 21'h071a1c, w0: 25'h0b35007};
      5'd21: log_coef = '{w2: 16'h1084, w1: 21'h06f7cf, w0: 25'h0ba5901};
      5'd22: log_coef = '{w2: 16'h0feb, w1: 21'h06d6c7, w0: 25'h0c14051};
      5'd23: log_coef = '{w2: 16'h0f59, w1: 21'h06b6f3, w0: 25'h0c80733};
      5'd24: log_coef = '{w2: 16'h0ed0, w1: 21'h069842, w0: 25'h0ceaed2};
      5'd25: log_coef = '{w2: 16'h0e4c, w1: 21'h067aa5, w0: 25'h0d53849};
      5'd26: log_coef = '{w2: 16'h0dd1, w1: 21'h065e0d, w0: 25'h0dba4a6};
      5'd27: log_coef = '{w2: 16'h0d5b, w1: 21'h06426d, w0: 25'h0e1f4e7};
      5'd28: log_coef = '{w2: 16'h0ceb, w1: 21'h0627b8, w0: 25'h0e829fd};
      5'd29: log_coef = '{w2: 16'h0c80, w1: 21'h060de4, w0: 25'h0ee44cf};
      5'd30: log_coef = '{w2: 16'h0c1a, w1: 21'h05f4e6, w0: 25'h0f44637};
      5'd31: log_coef = '{w2: 16'h0bb9, w1: 21'h05dcb1, w0: 25'h0fa2f05};
      default: log_coef = '{w2: '0, w1: '0, w0: '0};
    endcase
  endfunction
  // Coefficient multiplexer: segment index -> coefficient set of the function.
  function automatic tqa_coef_t tqa_coef(input tqa_func_e func, input logic [4:0] seg);
    if (func == TQA_EXP) tqa_coef = exp_coef(seg[3:0]);
    else                 tqa_coef = log_coef(seg);
  endfunction

endpackage
