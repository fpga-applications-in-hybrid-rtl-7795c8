// fuzzy_pkg: shared types and constants of the 8-bit fuzzy power manager.
//
// Every crisp input and every membership grade is an unsigned byte:
// 8'h00..8'hFF spans the universe of discourse of each variable, and a grade
// of 8'hFF means full membership. This follows the document. The breakpoints
// and slopes of the input membership functions, and the centres of the output
// sets, are the document's numbers. The rule table below is the rule base the
// document's FPGA realisation evaluates (20 rules, Mamdani min/max); the
// encoding of that table as a struct array is this design's own.
package fuzzy_pkg;

  typedef logic [7:0] grade_t;

  // The four crisp inputs, each an 8-bit code of its universe of discourse.
  typedef struct packed {
    grade_t bus;   // bus-voltage error, -30..30 V
    grade_t pdem;  // power demand, -400..400 W
    grade_t soc;   // battery state of charge, 0..1
    grade_t ucap;  // UC voltage, 0..400 V
  } crisp_t;

  // The eight grades the fuzzifier hands to the rule evaluator, in the
  // document's order grade1..grade8: bus-error pair, UC-voltage pair,
  // power-demand pair, SOC pair. Index 0 is grade1.
  localparam int unsigned NGRADES = 8;
  localparam int unsigned G_BUS  = 0;
  localparam int unsigned G_UCAP = 2;
  localparam int unsigned G_PDEM = 4;
  localparam int unsigned G_SOC  = 6;

  // Fuzzy sets of the inputs and outputs. Five-set variables (bus-voltage
  // error, power demand, Pbat, Pcap) use NL..PL; the storage-state variables
  // (battery SOC, UC voltage) use UNDER/NORMAL/OVER.
  typedef enum logic [2:0] {
    FS_NL     = 3'd0,
    FS_NS     = 3'd1,
    FS_ZE     = 3'd2,
    FS_PS     = 3'd3,
    FS_PL     = 3'd4,
    FS_UNDER  = 3'd5,
    FS_NORMAL = 3'd6,
    FS_OVER   = 3'd7
  } fset_e;

  // Which input an antecedent term reads.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_BUS  = 2'd1,  // DC/AC bus voltage error
    SRC_PDEM = 2'd2,  // power demand Pload - Ppv
    SRC_UCAP = 2'd3   // ultracapacitor voltage
  } src_e;

  // Crisp gate on a storage-state input ("NOT OVER", "NOT UNDER").
  typedef enum logic [1:0] {
    G_ANY      = 2'd0,
    G_NOT_OVER = 2'd1,
    G_NOT_UNDR = 2'd2
  } gate_e;

  // One IF-THEN rule: strength = MIN(term a, term b) when both gates hold.
  typedef struct packed {
    src_e  a_src;
    fset_e a_set;
    src_e  b_src;    // SRC_NONE: single-term rule
    fset_e b_set;
    gate_e soc_gate;
    gate_e ucap_gate;
    fset_e pbat;     // consequent set of Pbat (NL..PL)
    fset_e pcap;     // consequent set of Pcap (NL..PL)
  } rule_t;

  localparam int unsigned NRULES = 20;
  localparam int unsigned NSETS  = 5;   // output sets NL..PL

  // The rule base. Index i is rule i+1.
  localparam rule_t RULES [NRULES] = '{
    // bus-voltage stabilising rules
    '{SRC_BUS,  FS_NL, SRC_NONE, FS_NL, G_NOT_OVER, G_NOT_OVER, FS_PS, FS_PS},  // 1
    '{SRC_BUS,  FS_NS, SRC_NONE, FS_NL, G_NOT_OVER, G_ANY,      FS_PS, FS_ZE},  // 2
    '{SRC_BUS,  FS_ZE, SRC_NONE, FS_NL, G_ANY,      G_ANY,      FS_ZE, FS_ZE},  // 3
    '{SRC_BUS,  FS_PS, SRC_NONE, FS_NL, G_NOT_UNDR, G_ANY,      FS_NS, FS_ZE},  // 4
    '{SRC_BUS,  FS_PL, SRC_NONE, FS_NL, G_NOT_UNDR, G_NOT_UNDR, FS_NS, FS_NS},  // 5
    '{SRC_BUS,  FS_NL, SRC_NONE, FS_NL, G_NOT_OVER, G_ANY,      FS_PL, FS_ZE},  // 6
    '{SRC_BUS,  FS_NS, SRC_NONE, FS_NL, G_ANY,      G_NOT_OVER, FS_ZE, FS_PS},  // 7
    '{SRC_BUS,  FS_PS, SRC_NONE, FS_NL, G_ANY,      G_NOT_UNDR, FS_ZE, FS_NS},  // 8
    '{SRC_BUS,  FS_PL, SRC_NONE, FS_NL, G_ANY,      G_NOT_UNDR, FS_ZE, FS_NL},  // 9
    '{SRC_BUS,  FS_NL, SRC_NONE, FS_NL, G_ANY,      G_NOT_OVER, FS_ZE, FS_PL},  // 10
    '{SRC_BUS,  FS_PL, SRC_NONE, FS_NL, G_ANY,      G_NOT_UNDR, FS_NL, FS_ZE},  // 11
    // mismatch-compensating rules
    '{SRC_PDEM, FS_NL, SRC_NONE, FS_NL, G_ANY,      G_NOT_OVER, FS_ZE, FS_PL},  // 12
    '{SRC_PDEM, FS_NS, SRC_NONE, FS_NL, G_NOT_OVER, G_ANY,      FS_PS, FS_ZE},  // 13
    '{SRC_PDEM, FS_ZE, SRC_NONE, FS_NL, G_ANY,      G_ANY,      FS_ZE, FS_ZE},  // 14
    '{SRC_PDEM, FS_PS, SRC_NONE, FS_NL, G_NOT_UNDR, G_ANY,      FS_NS, FS_ZE},  // 15
    '{SRC_PDEM, FS_PL, SRC_NONE, FS_NL, G_ANY,      G_NOT_UNDR, FS_ZE, FS_NL},  // 16
    // UC saturated or depleted: the battery takes over
    '{SRC_UCAP, FS_OVER,  SRC_PDEM, FS_NL, G_NOT_OVER, G_ANY,   FS_PL, FS_ZE},  // 17
    '{SRC_UCAP, FS_OVER,  SRC_PDEM, FS_NS, G_NOT_OVER, G_ANY,   FS_PS, FS_ZE},  // 18
    '{SRC_UCAP, FS_UNDER, SRC_PDEM, FS_PS, G_NOT_UNDR, G_ANY,   FS_NS, FS_ZE},  // 19
    '{SRC_UCAP, FS_UNDER, SRC_PDEM, FS_PL, G_NOT_UNDR, G_ANY,   FS_NL, FS_ZE}   // 20
  };

  // Input membership functions (Fig. "membership functions of inputs" and the
  // breakpoints/slopes of the realisation). A five-set variable is described
  // per set k = NL..PL by: rise start R, peak C, fall end F (F = 256 means the
  // set stays full up to 8'hFF) and the rising/falling slopes in grade units
  // per input LSB. Set k is "active" for the rule evaluator on R <= x <= F.
  typedef int unsigned mf5_t [NSETS];

  // Bus-voltage error: -30..30 V onto 00..FF, peaks at 00,40,80,C0,FF.
  localparam mf5_t BUS_R  = '{0,   0,   64,  128, 192};
  localparam mf5_t BUS_C  = '{0,   64,  128, 192, 255};
  localparam mf5_t BUS_F  = '{64,  128, 192, 255, 256};
  localparam mf5_t BUS_SU = '{0,   4,   4,   4,   4};
  localparam mf5_t BUS_SD = '{4,   4,   4,   4,   0};

  // Power demand: -400..400 W onto 00..FF. NL falls from 00 to 60 (slope 3),
  // NS/Z/PS are narrow triangles (slope 8) peaking at 60,80,A0, PL rises
  // from A0 to FF (slope 3).
  localparam mf5_t PDEM_R  = '{0,   64,  96,  128, 160};
  localparam mf5_t PDEM_C  = '{0,   96,  128, 160, 255};
  localparam mf5_t PDEM_F  = '{96,  128, 160, 192, 256};
  localparam mf5_t PDEM_SU = '{0,   8,   8,   8,   3};
  localparam mf5_t PDEM_SD = '{3,   8,   8,   8,   0};

  // Storage-state variables: UNDER is full below A and falls to 0 at B;
  // NORMAL rises A..B, is full B..C and falls C..D; OVER rises C..D.
  // "NOT UNDER" is x >= B, "NOT OVER" is x < C.
  typedef struct packed {
    grade_t a, b, c, d, s1, s2;
  } mf3_t;

  localparam mf3_t SOC_MF  = '{a: 8'h33, b: 8'h3E, c: 8'hC3, d: 8'hCC, s1: 8'h17, s2: 8'h1C};
  localparam mf3_t UCAP_MF = '{a: 8'h29, b: 8'h37, c: 8'hDF, d: 8'hEF, s1: 8'h17, s2: 8'h1C};

  // Output set centres (codes), Fig. "membership functions of outputs".
  // Pbat: -300,-100,0,100,300 W on a +/-400 W scale.
  localparam grade_t PBAT_CTR [NSETS] = '{8'h20, 8'h60, 8'h80, 8'hA0, 8'hE0};
  // Pcap: -367,-184,0,184,367 W on a +/-550 W scale.
  localparam grade_t PCAP_CTR [NSETS] = '{8'h2A, 8'h55, 8'h80, 8'hAA, 8'hD4};

  // Output code used when no rule fires (zero power).
  localparam grade_t OUT_IDLE = 8'h80;

  // Saturating linear ramps of a membership function (grade = (x-a)*slope
  // rising, 8'hFF - (x-a)*slope falling), clipped to 0..255.
  function automatic grade_t ramp_up(input grade_t x, input grade_t a, input grade_t slope);
    logic [7:0]  d;
    logic [15:0] p;
    if (x < a) return 8'h00;
    d = x - a;
    p = {8'd0, d} * {8'd0, slope};
    return (p > 16'd255) ? 8'hFF : p[7:0];
  endfunction

  function automatic grade_t ramp_down(input grade_t x, input grade_t a, input grade_t slope);
    logic [7:0]  d;
    logic [15:0] p;
    if (x < a) return 8'hFF;
    d = x - a;
    p = {8'd0, d} * {8'd0, slope};
    return (p > 16'd255) ? 8'h00 : 8'hFF - p[7:0];
  endfunction

  function automatic grade_t gmax(input grade_t a, input grade_t b);
    return (a < b) ? b : a;
  endfunction

  function automatic grade_t gmin(input grade_t a, input grade_t b);
    return (a < b) ? a : b;
  endfunction

endpackage
