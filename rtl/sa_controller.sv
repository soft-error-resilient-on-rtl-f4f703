// sa_controller: adaptation control of the self-adaptive reliable data cache.
//
// At the end of each monitoring window (`win_done`) it looks at the number of
// errors detected in that window and at the current protection level, and
// moves one level up or down or stays:
//   parity only (P)          -> P + in-cache replication (ICR)  if errs > UP_P
//   P + ICR                  -> P + ICR + EWB/CCI               if errs > UP_ICR
//   P + ICR + EWB/CCI        -> P + ICR        after DN_EWB error-free windows in a row
//   P + ICR                  -> P              after DN_ICR error-free windows in a row
// The run of error-free windows restarts whenever a window has errors or the
// level changes. `icr_en` and `ewb_cci_en` are decoded from the level and
// drive the cache directly. The level starts at P after reset.
//
// Levels, thresholds (4 and 16 errors) and the two- and three-window
// downgrade histories follow the described design. Moving at most one level
// per window and starting at the lowest level are choices of this
// implementation.
module sa_controller import ser_pkg::*; #(
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned UP_P   = 4,    // errors per window to leave P
  parameter int unsigned UP_ICR = 16,   // errors per window to leave P+ICR upwards
  parameter int unsigned DN_EWB = 3,    // clean windows to leave the top level
  parameter int unsigned DN_ICR = 2     // clean windows to leave P+ICR downwards
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             win_done,
  input  logic [CNT_W-1:0] win_errs,
  output prot_level_e      level,
  output logic             icr_en,
  output logic             ewb_cci_en,
  output logic             upgrade,      // one-cycle pulses on a level change
  output logic             downgrade
);

  logic [2:0]  clean_run;    // consecutive error-free windows at this level
  prot_level_e level_n;
  logic [2:0]  run_n;

  always_comb begin
    level_n   = level;
    run_n     = (win_errs != '0) ? 3'd0 : (clean_run == 3'd7) ? clean_run : clean_run + 3'd1;
    upgrade   = 1'b0;
    downgrade = 1'b0;
    if (win_done) begin
      unique case (level)
        LVL_P: begin
          if (win_errs > CNT_W'(UP_P)) level_n = LVL_P_ICR;
        end
        LVL_P_ICR: begin
          if (win_errs > CNT_W'(UP_ICR))  level_n = LVL_P_ICR_EWB;
          else if (run_n >= 3'(DN_ICR))   level_n = LVL_P;
        end
        LVL_P_ICR_EWB: begin
          if (run_n >= 3'(DN_EWB))        level_n = LVL_P_ICR;
        end
        default: level_n = LVL_P;
      endcase
      upgrade   = level_n > level;
      downgrade = level_n < level;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level     <= LVL_P;
      clean_run <= '0;
    end else if (win_done) begin
      level     <= level_n;
      clean_run <= (level_n != level) ? 3'd0 : run_n;
    end
  end

  assign icr_en     = (level != LVL_P);
  assign ewb_cci_en = (level == LVL_P_ICR_EWB);

endmodule
