// tb_taxi_regs: checks the APB register block. It reads every register after reset
// (CTRL 0x08 for a subsystem end, credit registers 0x401 / 0x00100401 / 0x1001 /
// 0x401, the parameter words and the ID), writes each register and reads it back
// with its writable-bit mask, checks that the credit fields reach the credit
// outputs of the right channel, that the link Reset bit clears itself when the
// reset is done, that DummyAccessed sets on a dummy access and clears on any write
// to STATUS, and that the STATUS fields sit at the documented bit positions.
module tb_taxi_regs;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic psel = 0, penable = 0, pwrite = 0, pready;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic ctrl_en, ctrl_rst, ctrl_master, ctrl_qos_fwd, ctrl_force, ctrl_no_clk_gate;
  link_state_e ctrl_force_state;
  logic [7:0] cred_init [NCH];
  link_state_e state = LINK_DISABLED, remote_state = LINK_DISABLED;
  logic [7:0] wr_count = 0, rd_count = 0;
  logic idle = 0, dummy_hit = 0, rst_done = 0;
  int checks = 0, failures = 0;

  taxi_regs #(.MASTER_RST(1'b0), .TAXI_ID(32'hCAFE_0042)) dut (.pclk(clk), .presetn(rst_n), .*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic apb_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask
  task automatic expect_reg(logic [7:0] a, logic [31:0] e, string what);
    logic [31:0] d;
    apb_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL %s: reg %h = %h, expected %h", what, a, d, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    expect_reg(8'h00, 32'h08, "CTRL reset");
    expect_reg(8'h04, 32'h4000_0000, "STATUS reset");
    expect_reg(8'h0C, 32'h401, "AR credit reset");
    expect_reg(8'h10, 32'h0010_0401, "AW credit reset");
    expect_reg(8'h14, 32'h1001, "RR credit reset");
    expect_reg(8'h18, 32'h401, "BR credit reset");
    expect_reg(8'h7C, 32'hCAFE_0042, "ID");
    expect_reg(8'h20, {8'd16, 8'd2, 8'd5, 8'd8}, "PARAM_STATUS0");
    expect_reg(8'h24, {8'd5, 8'd5, 8'd3, 8'd3}, "PARAM_STATUS1");
    chk(ctrl_qos_fwd && !ctrl_master && !ctrl_en && !ctrl_rst, "CTRL outputs at reset");
    chk(cred_init[CH_AR] == 4 && cred_init[CH_AW] == 4 && cred_init[CH_WD] == 16 &&
        cred_init[CH_RR] == 16 && cred_init[CH_BR] == 4, "credit outputs at reset");
    // credit registers: mask and routing
    apb_write(8'h0C, 32'hFFFF_FFFF); expect_reg(8'h0C, 32'h0000_FF01, "AR credit mask");
    apb_write(8'h10, 32'h0020_0801); expect_reg(8'h10, 32'h0020_0801, "AW credit");
    apb_write(8'h14, 32'h0000_2000); expect_reg(8'h14, 32'h0000_2000, "RR credit");
    apb_write(8'h18, 32'h0000_0701); expect_reg(8'h18, 32'h0000_0701, "BR credit");
    apb_write(8'h0C, 32'h0000_0801);
    chk(cred_init[CH_AR] == 8 && cred_init[CH_AW] == 8 && cred_init[CH_WD] == 32 &&
        cred_init[CH_RR] == 32 && cred_init[CH_BR] == 7, "credit outputs after write");
    // CTRL fields
    apb_write(8'h00, 32'hFFFF_FFFF); expect_reg(8'h00, 32'h1FF, "CTRL mask");
    chk(ctrl_en && ctrl_rst && ctrl_master && ctrl_qos_fwd && ctrl_force && ctrl_no_clk_gate &&
        ctrl_force_state == LINK_RESET_CLEAR, "CTRL outputs");
    apb_write(8'h00, 32'h0000_00A7);
    chk(ctrl_force_state == LINK_IDLE && !ctrl_force && ctrl_en && ctrl_rst, "ForceState field");
    // Reset self-clears when the reset is done
    @(negedge clk); rst_done = 1; @(negedge clk); rst_done = 0;
    expect_reg(8'h00, 32'hA5, "Reset bit self-clears");
    // STATUS layout
    state = LINK_ACTIVE; remote_state = LINK_ACTIVE; wr_count = 8'h5A; rd_count = 8'hC3; idle = 1;
    expect_reg(8'h04, 32'h8000_0000 | (32'h5A << 21) | (32'hC3 << 13) | (3 << 1) | 1, "STATUS fields");
    idle = 0; remote_state = LINK_READY; wr_count = 0; rd_count = 0;
    @(negedge clk); dummy_hit = 1; @(negedge clk); dummy_hit = 0;
    expect_reg(8'h04, 32'h0000_0100 | (3 << 1), "DummyAccessed set");
    apb_write(8'h04, 32'h0);
    expect_reg(8'h04, (3 << 1), "DummyAccessed cleared by write");
    expect_reg(8'h40, 32'h0, "unused offset reads zero");
    chk(pready, "pready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
