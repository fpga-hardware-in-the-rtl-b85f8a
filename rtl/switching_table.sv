// switching_table: Takahashi look-up table that picks the inverter voltage
// vector from the flux comparator bit, the torque comparator code and the
// flux sector.
//
// Rows are the six (flux, torque) demands, columns the sectors 1..6; each
// entry is {Sa, Sb, Sc}. Torque "hold" selects a zero vector, alternating
// between (1,1,1) and (0,0,0) from sector to sector so that only one leg
// switches on entry to the zero state. The entries are those of the
// design's switching table; the 2-bit torque code is 2 = +1, 1 = 0, 0 = -1,
// matching the torque comparator. Sector numbers 0 and 7 and torque code 3
// cannot occur; they give (0,0,0), the table's default output.
// Interface: 1 + 2 + 3 bits in, sw_state_t out. Timing: combinational.
module switching_table
  import dtc_pkg::*;
(
  input  logic       cflux,   // 1: increase flux
  input  tq_err_e    ctq,     // torque demand
  input  logic [2:0] sector,  // 1..6
  output sw_state_t  sw       // {Sa, Sb, Sc}
);

  // One row per demand; entry k-1 is the vector for sector k, Sa as the MSB.
  typedef logic [2:0] vec_t;
  localparam vec_t ROW_F1_T1 [6] = '{3'b110, 3'b010, 3'b011, 3'b001, 3'b101, 3'b100};
  localparam vec_t ROW_F1_T0 [6] = '{3'b111, 3'b000, 3'b111, 3'b000, 3'b111, 3'b000};
  localparam vec_t ROW_F1_TM [6] = '{3'b101, 3'b100, 3'b110, 3'b010, 3'b011, 3'b001};
  localparam vec_t ROW_F0_T1 [6] = '{3'b010, 3'b011, 3'b001, 3'b101, 3'b100, 3'b110};
  localparam vec_t ROW_F0_T0 [6] = '{3'b000, 3'b111, 3'b000, 3'b111, 3'b000, 3'b111};
  localparam vec_t ROW_F0_TM [6] = '{3'b001, 3'b101, 3'b100, 3'b110, 3'b010, 3'b011};

  vec_t v;
  logic [2:0] col;

  always_comb begin
    v   = 3'b000;
    col = sector - 3'd1;
    if (sector >= 3'd1 && sector <= 3'd6) begin
      unique case ({cflux, ctq})
        {1'b1, TQ_INC}:  v = ROW_F1_T1[col];
        {1'b1, TQ_HOLD}: v = ROW_F1_T0[col];
        {1'b1, TQ_DEC}:  v = ROW_F1_TM[col];
        {1'b0, TQ_INC}:  v = ROW_F0_T1[col];
        {1'b0, TQ_HOLD}: v = ROW_F0_T0[col];
        {1'b0, TQ_DEC}:  v = ROW_F0_TM[col];
        default:         v = 3'b000;
      endcase
    end
    sw = sw_state_t'(v);
  end

endmodule
