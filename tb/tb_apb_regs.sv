// Testbench of the APB register file: APB write and read transfers
// (setup then access phase) to every register, reset values, the
// configuration outputs (including the detector choice and noise
// variance), the one-clock clear pulse and the status
// registers.
module tb_apb_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic psel, penable, pwrite, pready, pslverr;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;
  logic tx_mode, enable, clr_status, st_frame, st_ovf, det_mmse;
  logic [31:0] noise;
  logic [11:0] agc_ref;
  logic [7:0] fsd_thr, ndata, st_nsym;
  logic [1:0] tx_mod;
  logic [15:0] st_dphi;
  apb_regs dut (.*);

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d; @(posedge clk);
    penable <= 1; @(posedge clk);
    psel <= 0; penable <= 0; pwrite <= 0; @(posedge clk);
  endtask
  task automatic apb_read(logic [7:0] a, output logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a; @(posedge clk);
    penable <= 1; #1 d = prdata; @(posedge clk);
    psel <= 0; penable <= 0; @(posedge clk);
  endtask
  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  logic [31:0] d;
  int npulse = 0;
  always @(posedge clk) if (clr_status) npulse++;

  initial begin
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    st_frame = 1; st_ovf = 0; st_nsym = 8'd37; st_dphi = 16'hbeef;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    apb_read(8'h04, d); expect_eq("AGC_REF reset", d, 32'd512);
    apb_read(8'h18, d); expect_eq("NDATA reset", d, 32'd4);
    apb_write(8'h00, 32'h3);
    expect_eq("tx_mode", {31'd0, tx_mode}, 1); expect_eq("enable", {31'd0, enable}, 1);
    apb_write(8'h04, 32'hfff_0123); expect_eq("agc_ref", {20'd0, agc_ref}, 32'h123);
    apb_write(8'h08, 32'h40);       expect_eq("fsd_thr", {24'd0, fsd_thr}, 32'h40);
    apb_write(8'h0C, 32'h2);        expect_eq("tx_mod", {30'd0, tx_mod}, 32'h2);
    apb_write(8'h18, 32'h9);        expect_eq("ndata", {24'd0, ndata}, 32'h9);
    apb_read(8'h00, d); expect_eq("CTRL", d, 32'h3);
    apb_read(8'h04, d); expect_eq("AGC_REF", d, 32'h123);
    apb_read(8'h0C, d); expect_eq("TX_MOD", d, 32'h2);
    apb_read(8'h10, d); expect_eq("STATUS", d, {16'd0, 8'd37, 8'h01});
    st_ovf = 1;
    apb_read(8'h10, d); expect_eq("STATUS ovf", d, {16'd0, 8'd37, 8'h03});
    apb_read(8'h14, d); expect_eq("FOE", d, 32'hbeef);
    apb_write(8'h00, 32'h6);
    expect_eq("clear pulse count", npulse, 1);
    expect_eq("tx_mode off", {31'd0, tx_mode}, 0);
    apb_read(8'h1C, d); expect_eq("NOISE reset", d, 32'd1024);
    apb_write(8'h1C, 32'h89ab_cdef); expect_eq("noise", noise, 32'h89ab_cdef);
    apb_read(8'h1C, d); expect_eq("NOISE", d, 32'h89ab_cdef);
    apb_write(8'h00, 32'ha);       expect_eq("det_mmse", {31'd0, det_mmse}, 1);
    apb_read(8'h00, d); expect_eq("CTRL mmse", d, 32'ha);
    // setup without access must not write
    psel <= 1; pwrite <= 1; paddr <= 8'h08; pwdata <= 32'h11; @(posedge clk);
    psel <= 0; pwrite <= 0; @(posedge clk);
    expect_eq("setup only", {24'd0, fsd_thr}, 32'h40);
    expect_eq("pready", {31'd0, pready}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
