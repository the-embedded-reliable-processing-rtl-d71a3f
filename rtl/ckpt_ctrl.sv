// ckpt_ctrl -- checkpoint / rollback-recovery control logic.
//
// This is the small block that has to survive EMI (together with the safe storage
// and the EMI detector). It works from the SCLK edge strobes of sclk_gen:
//
//  * SCLK falling edge, normal operation: `ckpt` for one FCLK cycle. The core is
//    frozen for that cycle; its state and WB0/WB1 go into the checkpoint latch,
//    WB0 -> WB1 -> WB2 are promoted and WB2 is handed to the memory controller.
//  * SCLK rising edge, no EMI seen since the last rising edge: if the latch holds
//    a checkpoint it is written into the older safe-storage bank (`ss_we`), which
//    then becomes the newer one.
//  * SCLK rising edge with EMI seen (`det_r`, set by `sensor_in` and held until
//    this decision): rollback. The core is held (`hold`, `rmode`), the safe
//    storage is read from the older bank (`ss_oe_n` low). At the next rising edge
//    the latch takes that bank (`latch_from_ss`); at the falling edge after it the
//    core, WB0 and WB1 reload from the latch, WB2 is emptied (`restore`) and
//    execution resumes. EMI during the rollback restarts it at the next rising edge.
//    From first rising edge to resume takes one SCLK period plus its high time
//    (156 FCLK cycles with the defaults).
//
// Bank bookkeeping: `wr_bank` is the bank the next write goes to and `rb_bank`
// the bank a rollback reads. After a write to bank b both become ~b. After a
// rollback `rb_bank` is kept and `wr_bank` is set to the other bank, so the
// restored checkpoint survives until a newer one has been written and has itself
// aged past a clean decision; repeated EMI keeps reloading the same state.
// No checkpoint is taken at the falling edge that ends a rollback.
module ckpt_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic sclk_fall,
  input  logic sclk_rise,
  input  logic sensor_in,       // EMI detector output, active high
  output logic ckpt,            // take a checkpoint this cycle
  output logic hold,            // core frozen this cycle
  output logic rmode,           // rollback in progress
  output logic det_r,           // EMI seen, not yet acted upon
  output logic ss_we,
  output logic ss_wsel,
  output logic ss_rsel,
  output logic ss_oe_n,
  output logic latch_from_ss,
  output logic restore,         // core and WB0/WB1 reload from the latch
  output logic rollback_start   // strobe: a rollback (or restart of one) begins
);
  typedef enum logic [1:0] {S_RUN, S_RB_READ, S_RB_LOAD} state_e;

  state_e state;
  logic   latch_full;   // latch holds a checkpoint not yet written to safe storage
  logic   wr_bank, rb_bank;
  logic   emi;

  assign emi = det_r | sensor_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      latch_full <= 1'b0;
      wr_bank    <= 1'b0;
      rb_bank    <= 1'b0;
      det_r      <= 1'b0;
    end else begin
      // EMI detection is sticky until an SCLK rising edge acts on it
      if (sclk_rise)      det_r <= 1'b0;
      else if (sensor_in) det_r <= 1'b1;

      unique case (state)
        S_RUN: begin
          if (sclk_fall) latch_full <= 1'b1;
          if (sclk_rise) begin
            latch_full <= 1'b0;
            if (emi) begin
              state <= S_RB_READ;
            end else if (latch_full) begin
              wr_bank <= ~wr_bank;
              rb_bank <= ~wr_bank;
            end
          end
        end
        S_RB_READ: begin
          if (sclk_rise && !emi) state <= S_RB_LOAD;
        end
        S_RB_LOAD: begin
          if (sclk_fall) begin
            state   <= S_RUN;
            wr_bank <= ~rb_bank;
          end
        end
        default: state <= S_RUN;
      endcase
    end
  end

  always_comb begin
    rollback_start = sclk_rise && emi && (state != S_RB_LOAD);
    ckpt           = (state == S_RUN) && sclk_fall;
    rmode          = (state != S_RUN);
    hold           = rmode || ckpt || rollback_start;
    ss_we          = (state == S_RUN) && sclk_rise && !emi && latch_full;
    ss_wsel        = wr_bank;
    ss_rsel        = rb_bank;
    ss_oe_n        = !((state == S_RB_READ) || (state == S_RUN && sclk_rise && emi));
    latch_from_ss  = (state == S_RB_READ) && sclk_rise && !emi;
    restore        = (state == S_RB_LOAD) && sclk_fall;
  end

  // a rollback never overlaps a checkpoint or a safe-storage write
  assert property (@(posedge clk) disable iff (!rst_n) !(ckpt && restore))
    else $error("ckpt_ctrl: checkpoint during restore");
  assert property (@(posedge clk) disable iff (!rst_n) !(ss_we && rmode))
    else $error("ckpt_ctrl: safe-storage write during rollback");
endmodule
