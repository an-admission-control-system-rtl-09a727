// tb_tmac_scale: the token manager at other sizes, side by side.
// Runs tb_tmac_scale_unit with 10, 15 and 20 initiators and three tokens
// (the sizes used to judge how the manager grows), and with five
// initiators and four tokens, where the QoS initiator's share should drop
// from 1/3 to 1/4. Passes when every unit passes.
module tb_tmac_scale;
  logic clk = 0;
  logic [3:0] done;
  int c[4], f[4];

  always #5 clk = ~clk;

  tb_tmac_scale_unit #(.N(10), .T(3)) u10 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_tmac_scale_unit #(.N(15), .T(3)) u15 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_tmac_scale_unit #(.N(20), .T(3)) u20 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_tmac_scale_unit #(.N(5),  .T(4)) u54 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    wait (done == '1);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
