// mstc_hes_sched: subiteration sequencer of the 3D turbo decoder for the
// extended serial (ES) and hybrid extended serial (HES) structures.
//
// The three dimensions are decoded one after the other, each using the
// extrinsic information of the other two. The third dimension is the weakly
// protected one. With `hybrid` set (HES) it is skipped, scaling factor 0,
// during the first half of the iterations (a plain two-dimensional serial
// schedule), and then decoded with a scaling factor growing from 0.2 to 1.0;
// with `hybrid` clear (ES) all three dimensions are decoded in every
// iteration. For NIT = 10 this gives J = 25 subiterations (HES) or J = 30 (ES).
//
// Extrinsic storage is two memories. Each carries a tag naming the dimension
// whose extrinsic it holds (or none). A subiteration of dimension d adds the
// memories whose tag is another dimension, and writes its own (scaled)
// extrinsic into the memory already tagged d, else an untagged one, else the
// one written least recently. In the ES part this always leaves the
// extrinsic of the two other dimensions available, as the structure needs.
//
// Handshake: `start` (while idle) begins a frame. A command is presented
// with `cmd_valid` until the datapath pulses `sub_done`, then the next one
// follows on the next cycle. `done` pulses after the last subiteration.
// The schedule and the scaling ranges follow the source; the memory-tag
// mechanism and the Q4 scaling values are this design's own.
module mstc_hes_sched
  import mstc_pkg::*;
#(
  parameter int unsigned NIT = 10              // decoding iterations
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            hybrid,
  output logic            busy,
  output logic            cmd_valid,
  output logic [1:0]      cmd_dim,
  output logic [3:0]      cmd_it,
  output logic [W_SF-1:0] cmd_scale,            // Q4 scaling of the written extrinsic
  output logic [1:0]      cmd_rd_use,           // memories added as a priori
  output logic            cmd_wr_sel,           // memory written
  output logic            cmd_last,
  input  logic            sub_done,
  output logic            done
);
  typedef enum logic [1:0] {T_NONE, T_D0, T_D1, T_D2} tag_e;

  tag_e       tag [2];
  logic       older;                            // memory written least recently
  logic [1:0] dim;
  logic [3:0] it;
  logic       hyb;

  function automatic logic [W_SF-1:0] sf(input logic [1:0] d, input logic [3:0] i, input logic h);
    return scale_q4(int'(d), int'(i), NIT, h);
  endfunction

  // the dimension that follows (dim, it); returns it == NIT when finished
  logic [1:0] nx_dim;
  logic [3:0] nx_it;
  always_comb begin
    nx_dim = dim;
    nx_it  = it;
    if (dim == 2'd0) nx_dim = 2'd1;
    else if (dim == 2'd1 && sf(2'd2, it, hyb) != '0) nx_dim = 2'd2;
    else begin
      nx_dim = 2'd0;
      nx_it  = it + 1'b1;
    end
  end

  tag_e my_tag;
  always_comb begin
    my_tag = tag_e'(dim + 2'd1);
    for (int m = 0; m < 2; m++) cmd_rd_use[m] = (tag[m] != T_NONE) && (tag[m] != my_tag);
    if (tag[0] == my_tag)      cmd_wr_sel = 1'b0;
    else if (tag[1] == my_tag) cmd_wr_sel = 1'b1;
    else if (tag[0] == T_NONE) cmd_wr_sel = 1'b0;
    else if (tag[1] == T_NONE) cmd_wr_sel = 1'b1;
    else                       cmd_wr_sel = older;
  end

  assign cmd_valid = busy;
  assign cmd_dim   = dim;
  assign cmd_it    = it;
  assign cmd_scale = sf(dim, it, hyb);
  assign cmd_last  = (nx_it == 4'(NIT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; dim <= '0; it <= '0; hyb <= 1'b1; older <= 1'b0; done <= 1'b0;
      tag[0] <= T_NONE; tag[1] <= T_NONE;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; dim <= '0; it <= '0; hyb <= hybrid; older <= 1'b0;
          tag[0] <= T_NONE; tag[1] <= T_NONE;
        end
      end else if (sub_done) begin
        tag[cmd_wr_sel] <= my_tag;
        older <= ~cmd_wr_sel;
        dim   <= nx_dim;
        it    <= nx_it;
        if (cmd_last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  initial assert (NIT >= 1 && NIT <= 15) else $error("NIT out of range");
endmodule
