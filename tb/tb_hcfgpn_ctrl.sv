// tb_hcfgpn_ctrl: directed test of the HCfgPN control places.
// Each table row applies the five conditions, checks the combinational
// firing signals, clocks once and checks the new control marking
// {Pinit, Pa, Pi}.  The rows walk through start, kill, preemption,
// blocked transitions while preempted, resumption, finish, and the
// priorities Tw > Ti > Tfin.
`timescale 1ns/1ps
module tb_hcfgpn_ctrl;

  logic clk = 0, reset;
  logic init_cond, i_cond, a_cond, w_cond, fin_ready;
  logic p_init, p_a, p_i, t_init, t_i, t_a, t_w, t_fin, local_en;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  hcfgpn_ctrl dut (.*);

  typedef struct {
    logic [4:0] cond;   // init, i, a, w, fin
    logic [5:0] fire;   // t_init, t_i, t_a, t_w, t_fin, local_en
    logic [2:0] next;   // p_init, p_a, p_i after the clock
  } row_t;

  row_t rows[$] = '{
    '{5'b00000, 6'b000000, 3'b100},  // idle
    '{5'b10000, 6'b100000, 3'b010},  // Tinit
    '{5'b01011, 6'b000100, 3'b100},  // Tw beats Ti and Tfin
    '{5'b10000, 6'b100000, 3'b010},  // Tinit again
    '{5'b01001, 6'b010000, 3'b001},  // Ti beats Tfin
    '{5'b01011, 6'b000000, 3'b001},  // preempted: no Tw, Ti or Tfin, a low
    '{5'b00100, 6'b001000, 3'b010},  // Ta
    '{5'b00000, 6'b000001, 3'b010},  // active, local transitions enabled
    '{5'b00001, 6'b000011, 3'b100},  // Tfin
    '{5'b01101, 6'b000000, 3'b100},  // idle: nothing but Tinit can fire
    '{5'b11000, 6'b100000, 3'b010}   // Tinit, Ti not yet active
  };

  initial begin
    {init_cond, i_cond, a_cond, w_cond, fin_ready} = '0;
    reset = 1;
    @(negedge clk);
    reset = 0;
    checks++;
    if ({p_init, p_a, p_i} !== 3'b100) failures++;
    foreach (rows[k]) begin
      {init_cond, i_cond, a_cond, w_cond, fin_ready} = rows[k].cond;
      #1;
      checks++;
      if ({t_init, t_i, t_a, t_w, t_fin, local_en} !== rows[k].fire) begin
        failures++;
        $display("row %0d: firing %b expected %b", k,
                 {t_init, t_i, t_a, t_w, t_fin, local_en}, rows[k].fire);
      end
      @(negedge clk);
      checks++;
      if ({p_init, p_a, p_i} !== rows[k].next) begin
        failures++;
        $display("row %0d: marking %b expected %b", k, {p_init, p_a, p_i}, rows[k].next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
