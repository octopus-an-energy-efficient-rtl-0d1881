// xbar_network: the 8x8 interconnection network of the Octopus fabric.
//
// A fully connected crossbar. Every input section presents a request and the
// address of the output it wants; the network routes the request to that
// output section (request vector bit per input), routes the receiving MIC's
// acknowledge and done back to the requesting input section, and steers the
// data of each connected input to its output.
//
// It also keeps the connection state, one entry per output: valid and the
// source input. A port can take part in one connection at a time, as sender
// or as receiver, because the link between a MIC and its two sections is
// shared (half duplex); so at most N_PORTS/2 = 4 connections run in
// parallel. Requests from a busy input are hidden. An acknowledge from
// output d for input s is carried out only if s still requests d and both
// ports are free; acknowledges arriving in the same cycle are taken in port
// order, lowest output first, and a refused one simply has no effect (the
// MIC sees no connection in its status and arbitrates again). A done from
// output d releases its connection and pulses done to the source.
// Connection state changes at the clock edge after the command.
// The crossbar and half-duplex rule follow the architecture; the exact
// acceptance and conflict rules are this design's choice.
module xbar_network
  import octopus_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  // from the input sections
  input  logic [N_PORTS-1:0]               in_req,
  input  logic [N_PORTS-1:0][2:0]          in_addr,
  input  logic [N_PORTS-1:0][7:0]          in_data,
  input  logic [N_PORTS-1:0]               in_valid,
  output logic [N_PORTS-1:0]               ack_set,
  output logic [N_PORTS-1:0]               done_set,
  // to/from the output sections
  output logic [N_PORTS-1:0][N_PORTS-1:0]  out_req,   // [output][input]
  output logic [N_PORTS-1:0]               out_conn_valid,
  output logic [N_PORTS-1:0][2:0]          out_conn_src,
  output logic [N_PORTS-1:0][7:0]          out_data,
  output logic [N_PORTS-1:0]               out_valid,
  input  logic [N_PORTS-1:0]               ack_cmd,
  input  logic [N_PORTS-1:0][2:0]          ack_src,
  input  logic [N_PORTS-1:0]               done_cmd,
  // port in a connection (sender or receiver)
  output logic [N_PORTS-1:0]               busy
);

  logic [N_PORTS-1:0]      conn_valid_q, conn_valid_d;
  logic [N_PORTS-1:0][2:0] conn_src_q,   conn_src_d;

  // busy ports
  always_comb begin
    busy = '0;
    for (int d = 0; d < N_PORTS; d++) begin
      if (conn_valid_q[d]) begin
        busy[d]             = 1'b1;
        busy[conn_src_q[d]] = 1'b1;
      end
    end
  end

  // request routing
  always_comb begin
    for (int d = 0; d < N_PORTS; d++) begin
      for (int s = 0; s < N_PORTS; s++) begin
        out_req[d][s] = in_req[s] && (int'(in_addr[s]) == d) && !busy[s] && (s != d);
      end
    end
  end

  // connection set-up and release
  always_comb begin
    logic [N_PORTS-1:0] taken;
    conn_valid_d = conn_valid_q;
    conn_src_d   = conn_src_q;
    ack_set      = '0;
    done_set     = '0;
    taken        = busy;
    for (int d = 0; d < N_PORTS; d++) begin
      if (done_cmd[d] && conn_valid_q[d]) begin
        conn_valid_d[d]          = 1'b0;
        done_set[conn_src_q[d]]  = 1'b1;
      end else if (ack_cmd[d] && !conn_valid_q[d] && out_req[d][ack_src[d]] &&
                   !taken[d] && !taken[ack_src[d]]) begin
        conn_valid_d[d]     = 1'b1;
        conn_src_d[d]       = ack_src[d];
        taken[d]            = 1'b1;
        taken[ack_src[d]]   = 1'b1;
        ack_set[ack_src[d]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conn_valid_q <= '0;
      conn_src_q   <= '0;
    end else begin
      conn_valid_q <= conn_valid_d;
      conn_src_q   <= conn_src_d;
    end
  end

  // data crossbar
  always_comb begin
    for (int d = 0; d < N_PORTS; d++) begin
      out_data[d]  = conn_valid_q[d] ? in_data[conn_src_q[d]]  : 8'h00;
      out_valid[d] = conn_valid_q[d] && in_valid[conn_src_q[d]];
    end
  end

  assign out_conn_valid = conn_valid_q;
  assign out_conn_src   = conn_src_q;

  // at most one connection per port: sender and receiver ports are disjoint
  logic overlap;
  always_comb begin
    overlap = 1'b0;
    for (int d = 0; d < N_PORTS; d++)
      for (int e = d + 1; e < N_PORTS; e++)
        if (conn_valid_q[d] && conn_valid_q[e] &&
            (conn_src_q[d] == conn_src_q[e] || conn_src_q[d] == 3'(e) || conn_src_q[e] == 3'(d)))
          overlap = 1'b1;
  end

  a_one_connection_per_port: assert property (@(posedge clk) disable iff (!rst_n) !overlap)
    else $error("port used by two connections");

endmodule
