// iob_test_pkg: the test configurations and test vectors for one
// flip-flop + multiplexer set of an IOB, shared by the test controller and
// the testbenches.
//
// The IOB test needs three configurations, because the multiplexer selects
// and the flip-flop INIT value live in the configuration memory:
//   group 0: multiplexers on the direct path, INIT = 0
//   group 1: multiplexers on the registered path, INIT = 0
//   group 2: multiplexers on the registered path, INIT = 1
// Thirteen vectors (CLK, SR, CE, D) with their expected path output are
// applied across the three groups. A flip-flop here loads on a rising CLK
// edge: INIT when SR is high, else D when CE is high. The vectors are
// arranged so that only CLK changes at a rising edge.
//
// The first vector of group 1 expects the flip-flop to hold 1 before SR
// clears it; nothing in the preceding vectors stores a 1, so this design
// inserts two set-up vectors (load 1 with CE) at the head of group 1. They
// are marked as not part of the thirteen (table_row = 0).
package iob_test_pkg;

  typedef struct packed {
    logic [1:0] grp;        // configuration group 0..2
    logic [3:0] table_row;  // 1..13, 0 for an inserted set-up vector
    logic       clk;
    logic       sr;
    logic       ce;
    logic       d;
    logic       expect_q;   // expected output of the path
    logic       check;      // output is defined and is compared
  } iob_vec_t;

  localparam int unsigned N_VEC = 15;

  localparam iob_vec_t VECTORS [N_VEC] = '{
    //  grp   row    clk   sr    ce    d     exp   chk
    '{2'd0, 4'd1,  1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1},
    '{2'd0, 4'd2,  1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1},
    '{2'd1, 4'd0,  1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0},
    '{2'd1, 4'd0,  1'b1, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1},
    '{2'd1, 4'd3,  1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1},
    '{2'd1, 4'd4,  1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1},
    '{2'd1, 4'd5,  1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1},
    '{2'd1, 4'd6,  1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1},
    '{2'd1, 4'd7,  1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1},
    '{2'd1, 4'd8,  1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1},
    '{2'd1, 4'd9,  1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1},
    '{2'd1, 4'd10, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1},
    '{2'd2, 4'd11, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1},
    '{2'd2, 4'd12, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1},
    '{2'd2, 4'd13, 1'b1, 1'b1, 1'b1, 1'b0, 1'b1, 1'b1}
  };

  // Multiplexer select (1 = registered path) and INIT of each group.
  localparam logic [2:0] GROUP_MUX  = 3'b110;  // bit g for group g
  localparam logic [2:0] GROUP_INIT = 3'b100;

endpackage
