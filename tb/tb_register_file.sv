// tb_register_file: self-checking test of the multi-port register file.
// Every cycle the testbench writes a random set of registers through the six
// group ports and the In/Out port (sometimes several ports on one register,
// where the highest group port must win and the In/Out port loses), then
// compares both operand read ports and the In/Out read port with its own
// model. It also checks the reset value and that a read in the write cycle
// still returns the old value.
module tb_register_file;
  import lpalu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  reg_idx_t               raddr1, raddr2, io_waddr, io_raddr;
  logic [31:0]            rdata1, rdata2, io_wdata, io_rdata;
  logic [NGROUP-1:0]      we;
  reg_idx_t [NGROUP-1:0]  waddr;
  logic [NGROUP-1:0][31:0] wdata;
  logic                   io_we;
  logic [31:0]            model [NREG];
  int                     collisions = 0, multi = 0;

  register_file #(.W(32), .NWP(NGROUP)) dut (.*);

  initial begin
    we = '0; io_we = 0; raddr1 = 0; raddr2 = 0; io_raddr = 0; io_waddr = 0; io_wdata = 0;
    waddr = '0; wdata = '0;
    foreach (model[r]) model[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < int'(NREG); r++) begin
      io_raddr = reg_idx_t'(r); #1; checks++;
      if (io_rdata !== 32'h0) failures++;
    end
    repeat (3000) begin
      @(negedge clk);
      io_we = ($urandom_range(3) == 0);
      io_waddr = reg_idx_t'($urandom); io_wdata = $urandom;
      for (int p = 0; p < int'(NGROUP); p++) begin
        we[p] = ($urandom_range(2) == 0);
        waddr[p] = ($urandom_range(7) == 0) ? io_waddr : reg_idx_t'($urandom);
        wdata[p] = $urandom;
      end
      if ($countones(we) > 1) multi++;
      // reads in the write cycle see the old contents
      raddr1 = reg_idx_t'($urandom); raddr2 = reg_idx_t'($urandom); io_raddr = reg_idx_t'($urandom);
      #1;
      checks += 3;
      if (rdata1 !== model[raddr1]) failures++;
      if (rdata2 !== model[raddr2]) failures++;
      if (io_rdata !== model[io_raddr]) failures++;
      // model update in priority order: In/Out port, then group ports 0..5
      if (io_we) model[io_waddr] = io_wdata;
      for (int p = 0; p < int'(NGROUP); p++) begin
        if (we[p] && io_we && waddr[p] == io_waddr) collisions++;
        if (we[p]) model[waddr[p]] = wdata[p];
      end
    end
    @(negedge clk);
    we = '0; io_we = 1'b0;
    for (int r = 0; r < int'(NREG); r++) begin
      raddr1 = reg_idx_t'(r); raddr2 = reg_idx_t'(NREG - 1 - r); #1; checks += 2;
      if (rdata1 !== model[r]) failures++;
      if (rdata2 !== model[NREG - 1 - r]) failures++;
    end
    checks += 2;
    if (collisions == 0) failures++;
    if (multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
