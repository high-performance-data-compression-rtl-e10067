// algo_selector: cipher algorithm selector for each new session.
//
// Two techniques choose the cipher that the reconfigurable partition will hold:
//  - algorithm hopping: the three-bit LFSR advances once per session and its two
//    low bits {Q1,Q0} are the cipher ID;
//  - power adaptive: the power level decides (see power_selector).
// A request (next) starts a choice; sel_valid pulses for one cycle with the
// chosen cipher in sel_id, which then stays stable until the next request.
//
// Interface: mode picks the technique per request; seed_load/seed seed the LFSR
// once at start-up; level is the power reading. busy is high while a choice is
// being made; next is ignored while busy.
// Timing: power adaptive answers 1 cycle after next. Hopping answers 3 cycles
// after next, plus 2 cycles for every LFSR step that gives the unused ID 2'b11.
//
// Hopping with a seeded three-bit LFSR whose two bits form the ID, and the
// power mapping, follow the source design. Skipping the unused code 2'b11 by
// stepping the LFSR again is this design's choice; with the period-7 LFSR it
// yields AEGIS, ASCON and Deoxys-II two times each per period.
module algo_selector
  import dsec_pkg::*;
#(
  parameter int unsigned LEVEL_W = 8,
  parameter int unsigned MID_TH  = 85,
  parameter int unsigned HIGH_TH = 170
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sel_mode_e          mode,
  input  logic               seed_load,
  input  logic [2:0]         seed,
  input  logic [LEVEL_W-1:0] level,
  input  logic               next,
  output logic               busy,
  output logic               sel_valid,
  output cipher_e            sel_id,
  output logic [31:0]        skip_count   // LFSR steps skipped for code 2'b11
);

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_CHECK} state_e;
  state_e     state;
  logic       lfsr_en;
  logic [2:0] lfsr_q;
  cipher_e    pwr_id;
  pwr_class_e pwr_cls;

  lfsr3 u_lfsr (
    .clk, .rst_n, .seed_load, .seed, .en(lfsr_en), .q(lfsr_q)
  );

  power_selector #(.LEVEL_W(LEVEL_W), .MID_TH(MID_TH), .HIGH_TH(HIGH_TH)) u_pwr (
    .level, .cls(pwr_cls), .cipher(pwr_id)
  );

  assign lfsr_en = (state == S_STEP);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sel_valid  <= 1'b0;
      sel_id     <= CIPHER_AEGIS;
      skip_count <= '0;
    end else begin
      sel_valid <= 1'b0;
      unique case (state)
        S_IDLE:
          if (next) begin
            if (mode == SEL_POWER) begin
              sel_id    <= pwr_id;
              sel_valid <= 1'b1;
            end else begin
              state <= S_STEP;
            end
          end
        S_STEP:
          state <= S_CHECK;
        S_CHECK:
          if (lfsr_q[1:0] == 2'b11) begin
            skip_count <= skip_count + 1'b1;
            state      <= S_STEP;
          end else begin
            sel_id    <= cipher_e'(lfsr_q[1:0]);
            sel_valid <= 1'b1;
            state     <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
