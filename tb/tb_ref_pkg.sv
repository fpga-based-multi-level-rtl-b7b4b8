// tb_ref_pkg -- behavioural reference models for the compressor-tree testbenches.
//
// The models replay the linear arrays word by word with SystemVerilog queues.
// The list of regular inputs is a real FIFO: sum words are pushed as they are
// produced and popped in order, and a pop from an empty FIFO reads zero.  They
// do not use the design's own scheduling functions, so they check those
// independently.  Words are handled in 128 bits and masked to n bits, so n <= 128.
package tb_ref_pkg;

  typedef logic [127:0] word_t;
  typedef word_t       word_q_t [$];

  function automatic word_t wmask(input int n);
    return (n >= 128) ? '1 : ((128'd1 << n) - 128'd1);
  endfunction

  function automatic word_t maj(input word_t a, input word_t b, input word_t c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // Plain modular sum of all operands.
  function automatic word_t ref_sum(input word_q_t ops, input int n);
    word_t acc;
    acc = '0;
    foreach (ops[i]) acc += ops[i];
    return acc & wmask(n);
  endfunction

  // Linear array of 3:2 adders: operand 0 on the carry input of the first
  // adder, each carry word shifted into the next adder.
  function automatic void lin32_ref(input word_q_t ops, input int n,
                                    output word_t s_out, output word_t c_out,
                                    output int adders);
    word_q_t q;
    word_t   ci, a, b, s;
    q = ops[1:$];
    ci = ops[0];
    adders = 0;
    while (q.size() > 1) begin
      a = q.pop_front();
      b = q.pop_front();
      s = (a ^ b ^ ci) & wmask(n);
      ci = (maj(a, b, ci) << 1) & wmask(n);
      q.push_back(s);
      adders++;
    end
    s_out = q[0];
    c_out = ci;
  endfunction

  // Linear array of 5:3 compressor arrays: operands 0 and 1 on the two
  // carry inputs of the first array, ceil((nop-1)/2) arrays in all.
  function automatic void lin53_ref(input word_q_t ops, input int n,
                                    output word_t s_out, output word_t c_out,
                                    output word_t ca_last, output int zeros);
    word_q_t q;
    word_t   ca, cb, t, s, x [3];
    int      m;
    q = ops[2:$];
    ca = ops[0];
    cb = ops[1];
    m = ops.size() / 2;
    zeros = 0;
    s = '0;
    for (int k = 0; k < m; k++) begin
      for (int i = 0; i < 3; i++) begin
        if (q.size() > 0) x[i] = q.pop_front();
        else begin
          x[i] = '0;
          zeros++;
        end
      end
      t  = x[0] ^ x[1] ^ x[2];
      s  = (t ^ ca ^ cb) & wmask(n);
      ca_last = maj(x[0], x[1], x[2]) & wmask(n);
      cb = (maj(t, ca, cb) << 1) & wmask(n);
      ca = (ca_last << 1) & wmask(n);
      q.push_back(s);
    end
    s_out = s;
    c_out = cb;
  endfunction

  // Pipelined tree: each stage cuts its words into groups of x, reduces a
  // group of three or more words with the 3:2 linear array and passes
  // smaller groups on (one word is padded with a zero word), until two
  // words remain.
  function automatic void pipe_ref(input word_q_t ops, input int n,
                                   input int x, output word_t s_out,
                                   output word_t c_out, output int stages);
    word_q_t cur, nxt, grp;
    word_t   s, c;
    int      a;
    cur = ops;
    stages = 0;
    while (cur.size() > 2) begin
      nxt = {};
      for (int base = 0; base < cur.size(); base += x) begin
        grp = {};
        for (int i = base; i < base + x && i < cur.size(); i++)
          grp.push_back(cur[i]);
        if (grp.size() >= 3) begin
          lin32_ref(grp, n, s, c, a);
          nxt.push_back(s);
          nxt.push_back(c);
        end else begin
          nxt.push_back(grp[0]);
          nxt.push_back(grp.size() == 2 ? grp[1] : word_t'(0));
        end
      end
      cur = nxt;
      stages++;
    end
    s_out = cur[0];
    c_out = cur[1];
  endfunction

  // Random n-bit word, biased now and then towards all ones or zero so that
  // long carry chains and wrap-around occur.
  function automatic word_t rand_word(input int n);
    word_t w;
    int    r;
    r = $urandom_range(0, 9);
    if (r == 0) w = '1;
    else if (r == 1) w = '0;
    else w = {$urandom(), $urandom(), $urandom(), $urandom()};
    return w & wmask(n);
  endfunction

endpackage
