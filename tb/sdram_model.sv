// sdram_model: behavioural model of one SDRAM device (not synthesizable
// intent; testbench only) with NBANK banks, 32-bit words and tRP-tRCD-tCL
// timing. It executes the commands of sd_cmd: ACT opens a row, PRE closes it,
// RD returns the word T_CL cycles later on rdata/rvalid, WR stores wdata.
// Every timing or state rule that is broken (ACT on an open bank or before
// tRP, RD/WR on a closed bank, another row, or before tRCD) is counted in
// 'violations'. Words never written read as tb_pkg::mem_init(ID, ...).
module sdram_model
  import noc_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_CL  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sd_cmd_t     cmd,
  output logic [31:0] rdata,
  output logic        rvalid,
  output int          violations,
  output int          n_act,
  output int          n_pre,
  output int          n_col
);
  logic [31:0] mem [logic [24:0]];
  logic        open_v [4];
  logic [12:0] open_row [4];
  int          t_pre [4];
  int          t_act [4];
  int          now;
  logic [31:0] pipe_d [T_CL];
  logic        pipe_v [T_CL];

  assign rdata  = pipe_d[T_CL-1];
  assign rvalid = pipe_v[T_CL-1];

  always @(posedge clk) begin
    if (!rst_n) begin
      now <= 0; violations <= 0; n_act <= 0; n_pre <= 0; n_col <= 0;
      for (int b = 0; b < 4; b++) begin
        open_v[b] <= 1'b0; t_pre[b] <= -100; t_act[b] <= -100; open_row[b] <= '0;
      end
      for (int i = 0; i < int'(T_CL); i++) begin
        pipe_v[i] <= 1'b0; pipe_d[i] <= '0;
      end
    end else begin
      now <= now + 1;
      for (int i = T_CL - 1; i > 0; i--) begin
        pipe_v[i] <= pipe_v[i-1]; pipe_d[i] <= pipe_d[i-1];
      end
      pipe_v[0] <= 1'b0;
      pipe_d[0] <= '0;
      case (cmd.op)
        SD_ACT: begin
          n_act <= n_act + 1;
          if (open_v[cmd.bank] || now - t_pre[cmd.bank] < int'(T_RP)) violations <= violations + 1;
          open_v[cmd.bank] <= 1'b1; open_row[cmd.bank] <= cmd.row; t_act[cmd.bank] <= now;
        end
        SD_PRE: begin
          n_pre <= n_pre + 1;
          open_v[cmd.bank] <= 1'b0; t_pre[cmd.bank] <= now;
        end
        SD_RD, SD_WR: begin
          logic [24:0] a;
          a = {cmd.bank, cmd.row, cmd.col};
          n_col <= n_col + 1;
          if (!open_v[cmd.bank] || open_row[cmd.bank] != cmd.row ||
              now - t_act[cmd.bank] < int'(T_RCD)) violations <= violations + 1;
          if (cmd.op == SD_WR) mem[a] = cmd.wdata;
          else begin
            pipe_v[0] <= 1'b1;
            pipe_d[0] <= mem.exists(a) ? mem[a] : tb_pkg::mem_init(ID, cmd.bank, cmd.row, cmd.col);
          end
        end
        default: ;
      endcase
    end
  end
endmodule
