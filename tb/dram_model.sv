// dram_model: behavioural model of the DRAM banks around CIDAN-XE, for
// testbenches only. Each bank has ROWS rows of ROW_BITS bits and a row buffer
// (the bitline sense amplifiers). ACT opens a row; its data appears on
// bank_rd only T_RCD cycles later (before that the inverted data is shown,
// so a premature read is caught). PRE closes all banks. WR, with the bank's
// write enable, overwrites the open row with bank_wr. The model counts
// violations of tRCD, tRAS, tRP, tRRD and tFAW, and records the command
// history the testbench inspects. The commands and the timing rules are
// those of a standard DRAM; showing inverted data before T_RCD and the
// single-clock command bus are choices of this model.
module dram_model #(
  parameter int unsigned NUM_BANKS = 16,
  parameter int unsigned ROW_BITS  = 8192,
  parameter int unsigned ROWS      = 16,
  parameter int unsigned T_RCD     = 11,
  parameter int unsigned T_RAS     = 28,
  parameter int unsigned T_RP      = 11,
  parameter int unsigned T_RRD     = 6,
  parameter int unsigned T_FAW     = 24
) (
  input  logic                              clk,
  input  logic [1:0]                        cmd,       // 0 NOP, 1 ACT, 2 PRE, 3 WR
  input  logic [3:0]                        cmd_bank,
  input  logic [15:0]                       cmd_row,
  output logic [NUM_BANKS-1:0][ROW_BITS-1:0] bank_rd,
  input  logic [NUM_BANKS-1:0][ROW_BITS-1:0] bank_wr,
  input  logic [NUM_BANKS-1:0]              bank_wr_en
);
  logic [ROW_BITS-1:0] mem [NUM_BANKS][ROWS];
  logic [ROW_BITS-1:0] rowbuf [NUM_BANKS];
  int open_row [NUM_BANKS];
  longint act_time [NUM_BANKS];
  longint cyc = 0, last_pre = -1000;
  longint acts [$];
  int violations = 0;
  int n_act = 0, n_pre = 0, n_wr = 0;
  int rrd_bound = 0, faw_bound = 0, rp_bound = 0;

  initial for (int b = 0; b < NUM_BANKS; b++) begin
    open_row[b] = -1;
    act_time[b] = 0;
    rowbuf[b] = '0;
  end

  always_comb
    for (int b = 0; b < NUM_BANKS; b++)
      bank_rd[b] = (open_row[b] >= 0 && cyc - act_time[b] >= T_RCD) ? rowbuf[b] : ~rowbuf[b];

  function automatic void violation(string what);
    violations++;
    $display("DRAM timing violation at cycle %0d: %s", cyc, what);
  endfunction

  always @(posedge clk) begin
    case (cmd)
      2'd1: begin : act
        int b;
        b = cmd_bank;
        n_act++;
        if (open_row[b] >= 0) violation("ACT to an open bank");
        if (cyc - last_pre < T_RP) violation("tRP");
        if (acts.size() > 0 && cyc - acts[$] < T_RRD) violation("tRRD");
        if (acts.size() >= 4 && cyc - acts[acts.size()-4] < T_FAW) violation("tFAW");
        // which rule set the time of this ACT
        if (acts.size() > 0 && cyc - acts[$] == T_RRD) rrd_bound++;
        if (acts.size() >= 4 && cyc - acts[acts.size()-4] == T_FAW && cyc - acts[$] > T_RRD) faw_bound++;
        if (cyc - last_pre == T_RP) rp_bound++;
        acts.push_back(cyc);
        if (acts.size() > 8) void'(acts.pop_front());
        open_row[b] = int'(cmd_row) % ROWS;
        act_time[b] = cyc;
        rowbuf[b] = mem[b][open_row[b]];
      end
      2'd2: begin
        n_pre++;
        for (int b = 0; b < NUM_BANKS; b++)
          if (open_row[b] >= 0) begin
            if (cyc - act_time[b] < T_RAS) violation("tRAS");
            open_row[b] = -1;
          end
        last_pre = cyc;
      end
      2'd3: begin : wr
        int b;
        b = cmd_bank;
        n_wr++;
        if (open_row[b] < 0) violation("WR to a closed bank");
        else begin
          if (cyc - act_time[b] < T_RCD) violation("tRCD before WR");
          if (!bank_wr_en[b]) violation("WR without data from the NPE array");
          rowbuf[b] = bank_wr[b];
          mem[b][open_row[b]] = bank_wr[b];
        end
      end
      default: ;
    endcase
    cyc++;
  end
endmodule
